// Testbench of tmr_scrub_mem (writable configuration, small depth).
// Writes a reference pattern, upsets single words in different copies and
// checks that reads are still correct (voting) and that one scrub pass later
// all three copies hold the right data again (scrubbing). Random processor
// writes during scrubbing must never be undone by the scrubber, a pass must
// take 2*DEPTH cycles when nothing is written and longer when the processor
// writes (pause).
module tmr_scrub_mem_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int DEPTH = 32, AW = 5;
  logic clk = 0, rst = 0;
  logic [2:0] clk3, rst_n3;
  logic [2:0][AW-1:0] p_addr;
  logic [2:0] p_we, scrub_pass;
  logic [2:0][3:0] p_be;
  logic [2:0][31:0] p_wdata, p_rdata;
  logic [31:0] refm [DEPTH];
  int checks = 0, failures = 0;

  assign clk3 = {3{clk}};
  assign rst_n3 = {3{rst}};

  tmr_scrub_mem #(.DEPTH(DEPTH), .DW(32), .WRITABLE(1'b1)) dut (
    .clk(clk3), .rst_n(rst_n3), .p_addr(p_addr), .p_we(p_we), .p_be(p_be),
    .p_wdata(p_wdata), .p_rdata(p_rdata), .scrub_pass(scrub_pass));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, logic [31:0] v, logic [3:0] be);
    @(negedge clk);
    p_addr = {3{AW'(a)}}; p_we = 3'b111; p_be = {3{be}}; p_wdata = {3{v}};
    for (int b = 0; b < 4; b++) if (be[b]) refm[a][8*b +: 8] = v[8*b +: 8];
  endtask

  task automatic rd_check(int a);
    @(negedge clk);
    p_addr = {3{AW'(a)}}; p_we = '0;
    @(negedge clk);
    p_we = '0;
    for (int d = 0; d < 3; d++) begin
      checks++;
      if (p_rdata[d] !== refm[a]) begin
        failures++; $display("dom %0d read %0d got %h exp %h", d, a, p_rdata[d], refm[a]);
      end
    end
  endtask

  function automatic logic [31:0] copy_word(int k, int a);
    case (k)
      0: return dut.g_dom[0].u_bram.mem[a];
      1: return dut.g_dom[1].u_bram.mem[a];
      default: return dut.g_dom[2].u_bram.mem[a];
    endcase
  endfunction

  task automatic check_copies(string what);
    for (int a = 0; a < DEPTH; a++)
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (copy_word(k, a) !== refm[a]) begin
          failures++; $display("%s: copy %0d word %0d = %h exp %h", what, k, a, copy_word(k, a), refm[a]);
        end
      end
  endtask

  task automatic wait_pass(output int n);
    n = 0;
    @(negedge clk);
    while (!scrub_pass[0]) begin @(negedge clk); n++; end
  endtask

  initial begin
    int n;
    p_addr = '0; p_we = '0; p_be = '0; p_wdata = '0;
    for (int a = 0; a < DEPTH; a++) refm[a] = '0;
    repeat (3) @(negedge clk);
    rst = 1;
    for (int a = 0; a < DEPTH; a++) wr(a, $urandom, 4'hf);
    wr(3, 32'hA5A5_0000, 4'b0011);   // byte-enabled write
    for (int a = 0; a < DEPTH; a++) rd_check(a);
    // single upsets in different copies: masked on read
    dut.g_dom[0].u_bram.mem[4]  = dut.g_dom[0].u_bram.mem[4]  ^ 32'h0000_0100;
    dut.g_dom[1].u_bram.mem[9]  = dut.g_dom[1].u_bram.mem[9]  ^ 32'h8000_0001;
    dut.g_dom[2].u_bram.mem[17] = dut.g_dom[2].u_bram.mem[17] ^ 32'hFFFF_FFFF;
    dut.g_dom[1].u_bram.mem[30] = dut.g_dom[1].u_bram.mem[30] ^ 32'h0001_0000;
    rd_check(4); rd_check(9); rd_check(17); rd_check(30);
    // one complete pass repairs every copy
    wait_pass(n);
    wait_pass(n);
    checks++;
    if (n != 2 * DEPTH - 1) begin failures++; $display("idle pass took %0d cycles", n + 1); end
    check_copies("after scrub");
    // random writes while scrubbing: the scrubber must not undo them
    for (int i = 0; i < 400; i++) begin
      if ($urandom % 2) wr($urandom % DEPTH, $urandom, 4'($urandom));
      else begin @(negedge clk); p_we = '0; end
    end
    @(negedge clk); p_we = '0;
    repeat (4) @(negedge clk);
    check_copies("after writes");
    for (int a = 0; a < DEPTH; a++) rd_check(a);
    // writes pause the scrubber: a pass with writes takes longer
    wait_pass(n);
    fork
      wait_pass(n);
      begin
        for (int i = 0; i < 20; i++) wr(5, 32'h1234_5678 + i, 4'hf);
        @(negedge clk); p_we = '0;
      end
    join
    @(negedge clk); p_we = '0;
    checks++;
    if (n <= 2 * DEPTH - 1) begin failures++; $display("pass with writes took only %0d cycles", n + 1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
