// End-to-end testbench of leon3_dual_tmr_top at its default parameters.
//
// Two master models stand in for the two triplicated LEON3 cores and their
// AHB controllers; each drives its core's ROM and RAM in all three TMR
// domains and presents its bus as the three compared bus copies. Both run
// the same program in lock step: a boot phase that copies an image from the
// ROM into the RAM, then a loop of reads, read-modify-writes and byte
// stores. During the run single upsets are put into memory copies and into
// one copy of a core's bus; they must be masked (no wrong read, no
// disagreement) and the memory upsets repaired by the next scrub pass.
// Then core 2 is made to misbehave in two of its copies for one clock:
// the harness must report the disagreement and keep its failure flag set,
// also as read through the JTAG register.
//
// Counted mechanisms (each must happen at least once): ROM reads, RAM
// writes, wait states, scrubber pauses, masked memory upsets, scrub repairs,
// masked bus-copy upsets, activity high and low, disagreement, sticky
// failure, JTAG readout, heartbeat toggles. The ROM image is written into
// the memory copies directly, as FPGA configuration would: word a of it is
// ((a+1) * 32'h9E3779B9) ^ a.
module leon3_dual_tmr_top_tb;
  import leon3_tmr_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int IMG_WORDS = 256;   // image copied at boot
  localparam int LOOP_ITER = 40;    // iterations of the benchmark loop
  localparam int RAM_WORDS = 8192;  // default RAM depth of the top

  logic clk_in = 0, rst_in_n = 0;
  logic [2:0] clk_dom, rst_n_dom;
  ahb_slv_in_t  [1:0][2:0] rom_slv_i, ram_slv_i;
  ahb_slv_out_t [1:0][2:0] rom_slv_o, ram_slv_o;
  logic [1:0][2:0] rom_scrub_pass, ram_scrub_pass;
  cmp_bus_t [1:0][2:0] core_bus;
  status_t status;
  logic [STATUS_BITS-1:0] pio;
  logic jtag_tck = 0, jtag_sel = 0, jtag_capture = 0, jtag_shift = 0, jtag_tdi = 0, jtag_tdo;

  ahb_slv_in_t  [1:0] m_rom_i, m_ram_i;
  ahb_slv_out_t [1:0] m_rom_o, m_ram_o;
  cmp_bus_t     [1:0] m_bus;
  cmp_bus_t     [1:0][2:0] bus_flip;   // injected bus upsets

  int checks = 0, failures = 0;
  int n_stall = 0, n_pause = 0, n_mem_mask = 0, n_repair = 0, n_bus_mask = 0;
  int n_act_hi = 0, n_act_lo = 0, n_dis = 0, n_fail = 0, n_jtag = 0, n_hb = 0;
  int n_rom_rd = 0, n_ram_wr = 0, dis_during_run = 0;

  leon3_dual_tmr_top dut (.*);

  for (genvar c = 0; c < 2; c++) begin : g_core
    ahb_master_bfm u_bfm (.clk(clk_dom[0]), .rom_i(m_rom_i[c]), .rom_o(m_rom_o[c]),
                          .ram_i(m_ram_i[c]), .ram_o(m_ram_o[c]), .bus(m_bus[c]));
    assign rom_slv_i[c] = {3{m_rom_i[c]}};
    assign ram_slv_i[c] = {3{m_ram_i[c]}};
    assign m_rom_o[c]   = rom_slv_o[c][0];
    assign m_ram_o[c]   = ram_slv_o[c][0];
    for (genvar d = 0; d < 3; d++) begin : g_dom
      assign core_bus[c][d] = m_bus[c] ^ bus_flip[c][d];
    end
  end

  always #2.5 clk_in = ~clk_in;     // 200 MHz
  always #50  jtag_tck = ~jtag_tck; // 10 MHz

  // mechanism monitors
  always @(posedge clk_dom[0]) begin
    if (dut.g_core[0].u_ahbram.u_mem.s_pause[0]) n_pause++;
    if (status.disagree != 3'b000 && rst_n_dom[0]) n_dis++;
  end
  logic hb_prev;
  always @(posedge clk_in) begin
    if (status.hb_global != hb_prev) n_hb++;
    hb_prev <= status.hb_global;
  end

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] img(int a);
    return ((a + 1) * 32'h9E37_79B9) ^ a;
  endfunction

  function automatic void load_rom();
    for (int a = 0; a < IMG_WORDS; a++) begin
      dut.g_core[0].u_ahbrom.u_mem.g_dom[0].u_bram.mem[a] = img(a);
      dut.g_core[0].u_ahbrom.u_mem.g_dom[1].u_bram.mem[a] = img(a);
      dut.g_core[0].u_ahbrom.u_mem.g_dom[2].u_bram.mem[a] = img(a);
      dut.g_core[1].u_ahbrom.u_mem.g_dom[0].u_bram.mem[a] = img(a);
      dut.g_core[1].u_ahbrom.u_mem.g_dom[1].u_bram.mem[a] = img(a);
      dut.g_core[1].u_ahbrom.u_mem.g_dom[2].u_bram.mem[a] = img(a);
      g_core[0].u_bfm.preload(4 * a, img(a));
      g_core[1].u_bfm.preload(4 * a, img(a));
    end
  endfunction

  // the same transfer into both cores' queues
  function automatic void push2(bit w, logic [31:0] a, logic [2:0] s, logic [31:0] v);
    g_core[0].u_bfm.push(w, a, s, v);
    g_core[1].u_bfm.push(w, a, s, v);
  endfunction

  task automatic run2();
    fork
      g_core[0].u_bfm.run();
      g_core[1].u_bfm.run();
    join
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic jtag_read(output logic [STATUS_BITS-1:0] v);
    repeat (4) @(negedge jtag_tck);
    jtag_sel = 1; jtag_capture = 1;
    @(negedge jtag_tck);
    jtag_capture = 0; jtag_shift = 1;
    for (int i = 0; i < STATUS_BITS; i++) begin
      v[i] = jtag_tdo;
      @(negedge jtag_tck);
    end
    jtag_shift = 0; jtag_sel = 0;
  endtask

  initial begin
    logic [STATUS_BITS-1:0] jv;
    status_t js;
    logic [31:0] w0, w1, w2;
    int n;
    realtime t0;
    bus_flip = '0;
    hb_prev = 0;
    load_rom();
    #500;
    rst_in_n = 1;
    wait (rst_n_dom == 3'b111);
    repeat (2) @(posedge clk_dom[0]);

    // domain clock period: four input clocks
    @(posedge clk_dom[0]); t0 = $realtime;
    @(posedge clk_dom[0]);
    check($realtime - t0 == 20.0, "domain clock is the input clock divided by four");

    // boot: copy the image from ROM to RAM
    for (int a = 0; a < IMG_WORDS; a++) begin
      push2(0, 4 * a, 3'd2, 0);
      push2(1, 32'h4000_0000 + 4 * a, 3'd2, img(a));
    end
    fork
      run2();
      begin   // upsets while booting: one ROM copy of each core
        repeat (50) @(posedge clk_dom[0]);
        dut.g_core[1].u_ahbrom.u_mem.g_dom[2].u_bram.mem[200] = 32'hDEAD_BEEF;
        dut.g_core[0].u_ahbrom.u_mem.g_dom[0].u_bram.mem[230] = 32'h0;
        n_mem_mask += 2;
      end
    join
    // benchmark loop: read, modify, write back, byte stores, readback
    for (int it = 0; it < LOOP_ITER; it++) begin
      for (int k = 0; k < 8; k++) begin
        logic [31:0] a = 32'h4000_0000 + 4 * ((it * 8 + k) % IMG_WORDS);
        push2(0, a, 3'd2, 0);
        push2(1, a, 3'd2, img(it + k) + 32'(it));
        push2(0, a, 3'd2, 0);
        push2(1, a + 32'(k % 4), 3'd0, 32'(it * 16 + k) << 24 >> (8 * (k % 4)));
      end
      push2(0, 32'h4000_0000 + 4 * IMG_WORDS + 4 * it, 3'd2, 0);
      push2(0, 4 * it, 3'd1, 0);
    end
    fork
      run2();
      begin   // upsets while running: RAM copies and one bus copy
        repeat (100) @(posedge clk_dom[0]);
        dut.g_core[0].u_ahbram.u_mem.g_dom[1].u_bram.mem[3] =
          dut.g_core[0].u_ahbram.u_mem.g_dom[1].u_bram.mem[3] ^ 32'h0000_4000;
        dut.g_core[1].u_ahbram.u_mem.g_dom[0].u_bram.mem[IMG_WORDS + 5] = 32'h1;
        n_mem_mask += 2;
        repeat (20) @(posedge clk_dom[0]);
        @(negedge clk_dom[0]);
        bus_flip[0][1] = {$urandom, $urandom, $urandom, $urandom};
        repeat (5) @(negedge clk_dom[0]);
        bus_flip[0][1] = '0;
        n_bus_mask++;
      end
      begin
        repeat (50) @(posedge clk_dom[0]);
        check(status.act_core1 == 3'b111 && status.act_core2 == 3'b111, "cores active while running");
        n_act_hi++;
      end
    join
    n_stall  = g_core[0].u_bfm.stalls;
    n_rom_rd = g_core[0].u_bfm.rom_reads;
    n_ram_wr = g_core[0].u_bfm.ram_writes;
    check(g_core[0].u_bfm.failures == 0 && g_core[1].u_bfm.failures == 0, "all reads correct despite upsets");
    check(g_core[0].u_bfm.cycles == g_core[1].u_bfm.cycles, "cores in lock step");
    dis_during_run = n_dis;
    check(dis_during_run == 0 && status.fail == 3'b000, "no disagreement from masked upsets");

    // idle: activity drops
    repeat (300) @(posedge clk_dom[0]);
    check(status.act_core1 == 3'b000 && status.act_core2 == 3'b000, "activity low when idle");
    n_act_lo++;

    // one full scrub pass of every memory, then all copies agree again
    for (int p = 0; p < 2; p++) begin
      @(posedge clk_dom[0]);
      while (!ram_scrub_pass[0][0]) @(posedge clk_dom[0]);
    end
    w0 = dut.g_core[0].u_ahbram.u_mem.g_dom[1].u_bram.mem[3];
    w1 = dut.g_core[0].u_ahbram.u_mem.g_dom[0].u_bram.mem[3];
    check(w0 === w1, "core 1 RAM copy 1 repaired"); if (w0 === w1) n_repair++;
    w0 = dut.g_core[1].u_ahbram.u_mem.g_dom[0].u_bram.mem[IMG_WORDS + 5];
    w1 = dut.g_core[1].u_ahbram.u_mem.g_dom[1].u_bram.mem[IMG_WORDS + 5];
    check(w0 === w1 && w0 === 32'h0, "core 2 RAM copy 0 repaired"); if (w0 === w1) n_repair++;
    w2 = dut.g_core[1].u_ahbrom.u_mem.g_dom[2].u_bram.mem[200];
    check(w2 === img(200), "core 2 ROM copy 2 repaired"); if (w2 === img(200)) n_repair++;
    w2 = dut.g_core[0].u_ahbrom.u_mem.g_dom[0].u_bram.mem[230];
    check(w2 === img(230), "core 1 ROM copy 0 repaired"); if (w2 === img(230)) n_repair++;

    // JTAG readout before the failure
    jtag_read(jv);
    js = status_t'(jv);
    check(js.fail == 3'b000, "JTAG reports no failure");
    n_jtag++;

    // core 2 misbehaves in two of its copies for one clock
    @(negedge clk_dom[0]);
    bus_flip[1][0] = CMP_BITS'(1) << 40;
    bus_flip[1][2] = CMP_BITS'(1) << 40;
    @(negedge clk_dom[0]);
    bus_flip[1] = '0;
    repeat (3) @(negedge clk_dom[0]);
    check(n_dis > 0, "disagreement reported");
    check(status.fail == 3'b111, "failure caught");
    repeat (100) @(negedge clk_dom[0]);
    check(status.fail == 3'b111 && status.disagree == 3'b000, "failure flag sticky");
    if (status.fail == 3'b111) n_fail++;
    jtag_read(jv);
    js = status_t'(jv);
    check(js.fail == 3'b111, "JTAG reports the failure");
    check(jv == STATUS_BITS'(status) || js.hb_global != status.hb_global
          || js.hb_dom != status.hb_dom, "JTAG word equals the status pins");
    n_jtag++;
    check(pio == STATUS_BITS'(status), "pins carry the status");

    // heartbeat: wait for the global heartbeat to toggle
    n = 0;
    while (n_hb < 1 && n < (1 << 26)) begin @(posedge clk_dom[0]); n++; end
    repeat (10) @(posedge clk_dom[0]);

    check(n_rom_rd > 0, "ROM reads");
    check(n_ram_wr > 0, "RAM writes");
    check(n_stall > 0, "wait states");
    check(n_pause > 0, "scrubber pauses");
    check(n_mem_mask > 0 && n_bus_mask > 0, "masked upsets");
    check(n_repair == 4, "scrub repairs");
    check(n_act_hi > 0 && n_act_lo > 0, "activity high and low");
    check(n_dis > 0 && n_fail > 0, "disagreement and failure");
    check(n_jtag == 2, "JTAG readouts");
    check(n_hb >= 1 && status.hb_dom == {3{status.hb_global}}, "heartbeat toggles");
    $display("mechanisms: rom_reads=%0d ram_writes=%0d wait_states=%0d scrub_pauses=%0d mem_upsets_masked=%0d bus_upsets_masked=%0d scrub_repairs=%0d act_hi=%0d act_lo=%0d disagree_cycles=%0d fail=%0d jtag=%0d heartbeat_toggles=%0d",
             n_rom_rd, n_ram_wr, n_stall, n_pause, n_mem_mask, n_bus_mask, n_repair,
             n_act_hi, n_act_lo, n_dis, n_fail, n_jtag, n_hb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
