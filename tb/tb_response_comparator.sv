// tb_response_comparator: exhaustive check of the 2-bit comparator used for
// c17 and a random check of a 7-bit one.
module tb_response_comparator;
  int checks = 0, failures = 0;

  logic [1:0] g2, q2;  logic m2;
  logic [6:0] g7, q7;  logic m7;

  response_comparator #(.W(2)) u2 (.golden(g2), .faulty(q2), .mismatch(m2));
  response_comparator #(.W(7)) u7 (.golden(g7), .faulty(q7), .mismatch(m7));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        g2 = 2'(a); q2 = 2'(b); #1;
        checks++;
        if (m2 !== (a != b)) begin
          failures++; $display("FAIL W=2 %0d vs %0d -> %b", a, b, m2);
        end
      end
    for (int i = 0; i < 200; i++) begin
      g7 = 7'($urandom);
      q7 = (i % 3 == 0) ? g7 : 7'($urandom);
      if (i % 5 == 1) q7 = g7 ^ (7'd1 << (i % 7));
      #1;
      checks++;
      if (m7 !== (g7 != q7)) begin
        failures++; $display("FAIL W=7 %h vs %h -> %b", g7, q7, m7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
