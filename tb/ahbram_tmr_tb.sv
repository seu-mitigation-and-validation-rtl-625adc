// Testbench of ahbram_tmr. One master model drives the same transfers into
// all three TMR domains. Checks: every read against the reference memory,
// equal HRDATA/HREADY in all domains, masking of upsets in single memory
// copies and of a wrong write in one domain, repair of every copy after one
// scrub pass, and the scrub pass length (2*DEPTH cycles when idle).
module ahbram_tmr_tb;
  import leon3_tmr_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  ahb_slv_in_t  ram_i, rom_i;
  ahb_slv_out_t ram_o, rom_o;
  cmp_bus_t     bus;
  ahb_slv_in_t  [2:0] slv_i;
  ahb_slv_out_t [2:0] slv_o;
  logic [2:0] scrub_pass;
  bit corrupt_dom2 = 0;
  int checks = 0, failures = 0, dom_mismatch = 0;

  ahb_master_bfm u_bfm (.clk(clk), .rom_i(rom_i), .rom_o(rom_o), .ram_i(ram_i), .ram_o(ram_o), .bus(bus));

  always_comb begin
    slv_i = {3{ram_i}};
    if (corrupt_dom2) slv_i[2].hwdata = ~ram_i.hwdata;
  end
  assign ram_o = slv_o[0];
  assign rom_o = '{hrdata: 32'h0, hready: 1'b1, hresp: 2'b00};

  ahbram_tmr #(.DEPTH(DEPTH)) dut (.clk({3{clk}}), .rst_n({3{rst_n}}), .slv_i(slv_i), .slv_o(slv_o),
                                  .scrub_pass(scrub_pass));

  always #5 clk = ~clk;

  always @(posedge clk)
    if (rst_n && (slv_o[1] !== slv_o[0] || slv_o[2] !== slv_o[0])) dom_mismatch++;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] copy_word(int k, int a);
    case (k)
      0: return dut.u_mem.g_dom[0].u_bram.mem[a];
      1: return dut.u_mem.g_dom[1].u_bram.mem[a];
      default: return dut.u_mem.g_dom[2].u_bram.mem[a];
    endcase
  endfunction

  task automatic check_copies();
    for (int a = 0; a < DEPTH; a++)
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (copy_word(k, a) !== u_bfm.ref_read(32'h4000_0000 + 4*a)) begin
          failures++; $display("copy %0d word %0d = %h", k, a, copy_word(k, a));
        end
      end
  endtask

  task automatic read_all();
    for (int a = 0; a < DEPTH; a++) u_bfm.push(0, 32'h4000_0000 + 4*a, 3'd2, 0);
    u_bfm.run();
  endtask

  initial begin
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) u_bfm.push(1, 32'h4000_0000 + 4*a, 3'd2, $urandom);
    for (int i = 0; i < 100; i++)
      u_bfm.push($urandom % 2, 32'h4000_0000 + ($urandom % (4*DEPTH)), 3'd0, $urandom);
    u_bfm.run();
    read_all();
    // upsets in single copies, and one domain writing a wrong word
    dut.u_mem.g_dom[0].u_bram.mem[7]  = ~dut.u_mem.g_dom[0].u_bram.mem[7];
    dut.u_mem.g_dom[2].u_bram.mem[40] = dut.u_mem.g_dom[2].u_bram.mem[40] ^ 32'h10;
    corrupt_dom2 = 1;
    u_bfm.push(1, 32'h4000_0000 + 4*12, 3'd2, 32'hCAFE_F00D);
    u_bfm.run();
    corrupt_dom2 = 0;
    checks++;
    if (copy_word(2, 12) === 32'hCAFE_F00D) begin failures++; $display("domain 2 write not corrupted"); end
    read_all();
    // one full scrub pass: every copy repaired
    n = 0;
    @(negedge clk); while (!scrub_pass[0]) @(negedge clk);
    @(negedge clk); while (!scrub_pass[0]) begin @(negedge clk); n++; end
    checks++;
    if (n != 2 * DEPTH - 1) begin failures++; $display("scrub pass %0d cycles", n + 1); end
    @(negedge clk);
    check_copies();
    checks++;
    if (dom_mismatch != 0) begin failures++; $display("domains differ in %0d cycles", dom_mismatch); end
    checks += u_bfm.checks;
    failures += u_bfm.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
