// tb_majority_vote: random byte triples plus the case of one copy wholly
// replaced; each output bit must be the majority of its three inputs.
module tb_majority_vote;
  logic [7:0] a, b, c, y;
  logic disagree;
  int checks = 0, failures = 0;
  majority_vote dut (.*);
  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [7:0] e;
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom);
      case (n % 4)
        0: b = a;                  // c is the jammed copy
        1: c = a;
        2: begin b = a; c = a; end
        default: ;
      endcase
      #1;
      for (int k = 0; k < 8; k++) e[k] = (int'(a[k]) + int'(b[k]) + int'(c[k])) >= 2;
      checks++;
      if (y != e || disagree != !(a == b && b == c)) begin
        failures++;
        $display("FAIL %02h %02h %02h -> %02h exp %02h", a, b, c, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
