// Testbench of tmr_voter: random vectors with one corrupted copy must vote
// back to the original, and for fully random inputs every output bit must be
// set exactly when at least two input bits are set.
module tmr_voter_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int W = 16;
  logic [W-1:0] a, b, c, y;
  int checks = 0, failures = 0;

  tmr_voter #(.W(W)) dut (.a(a), .b(b), .c(c), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      logic [W-1:0] v = W'($urandom), m = W'($urandom);
      a = v; b = v; c = v;
      case (n % 3) 0: a = v ^ m; 1: b = v ^ m; default: c = v ^ m; endcase
      #1;
      checks++;
      if (y !== v) begin failures++; $display("masking failed %h %h %h -> %h", a, b, c, y); end
    end
    for (int n = 0; n < 300; n++) begin
      logic [W-1:0] e;
      a = W'($urandom); b = W'($urandom); c = W'($urandom);
      for (int i = 0; i < W; i++) e[i] = (int'(a[i]) + int'(b[i]) + int'(c[i])) >= 2;
      #1;
      checks++;
      if (y !== e) begin failures++; $display("vote wrong %h %h %h -> %h", a, b, c, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
