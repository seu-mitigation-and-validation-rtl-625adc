// Dual-processor SEU test system around two triplicated LEON3 processor
// systems.
//
// Two identical, fully triplicated LEON3 systems run the same program in
// lock step. A fault-tolerant comparator checks their bus signals every clock
// and raises a sticky, triplicated failure flag the first time they disagree,
// so an upset that makes one processor misbehave is seen from inside the chip
// without a golden reference outside it. The status goes out on pins and
// through a JTAG user register.
//
// This module holds everything of the system except the processors and the
// bus fabric, which are reused IP and connect through ports:
//   - clk_rst_mgr: 200 MHz in, three 50 MHz domain clocks and resets out;
//   - per core, the mitigated boot ROM (ahbrom_tmr) and RAM (ahbram_tmr):
//     triplicated, voted, self-scrubbing AHB slaves; their slave ports are
//     driven by each core's AHB controller, per TMR domain;
//   - the comparison chain: bus_vote_compare (104 bits per domain),
//     bus_vote_reduce (one disagreement bit and the failure catch register
//     per domain) and one activity_mon per core;
//   - status_if: the status word on pins (pio) and behind the JTAG
//     boundary-scan signals.
// core_bus[c][d] is the 104-bit bus bundle of core c+1's TMR copy d (see
// leon3_tmr_pkg::cmp_bus_t). All logic of domain d runs on clk_dom[d].
//
// The block set and its chain follow the published dual-processor harness;
// the port-level split between this RTL and the reused processor IP is this
// design's choice.
module leon3_dual_tmr_top
  import leon3_tmr_pkg::*;
#(
  parameter int unsigned CLK_DIV   = 4,
  parameter int unsigned HB_BITS   = 24,
  parameter int unsigned ROM_DEPTH = 8192,
  parameter int unsigned RAM_DEPTH = 8192,
  parameter string       ROM_INIT  = "",
  parameter int unsigned ACT_WIN   = 256
) (
  input  logic                                clk_in,
  input  logic                                rst_in_n,
  // domain clocks and resets for the processor systems
  output logic         [NDOM-1:0]             clk_dom,
  output logic         [NDOM-1:0]             rst_n_dom,
  // memory slave ports, per core and TMR domain
  input  ahb_slv_in_t  [NCORE-1:0][NDOM-1:0]  rom_slv_i,
  output ahb_slv_out_t [NCORE-1:0][NDOM-1:0]  rom_slv_o,
  input  ahb_slv_in_t  [NCORE-1:0][NDOM-1:0]  ram_slv_i,
  output ahb_slv_out_t [NCORE-1:0][NDOM-1:0]  ram_slv_o,
  output logic         [NCORE-1:0][NDOM-1:0]  rom_scrub_pass,
  output logic         [NCORE-1:0][NDOM-1:0]  ram_scrub_pass,
  // compared processor bus signals, per core and TMR domain
  input  cmp_bus_t     [NCORE-1:0][NDOM-1:0]  core_bus,
  // status
  output status_t                             status,
  output logic         [STATUS_BITS-1:0]      pio,
  input  logic                                jtag_tck,
  input  logic                                jtag_sel,
  input  logic                                jtag_capture,
  input  logic                                jtag_shift,
  input  logic                                jtag_tdi,
  output logic                                jtag_tdo
);

  logic                          hb_global;
  logic [NDOM-1:0]               hb_dom, disagree, fail;
  logic [NCORE-1:0][NDOM-1:0]    act;
  logic [NDOM-1:0][CMP_BITS-1:0] mis;

  clk_rst_mgr #(.CLK_DIV(CLK_DIV), .HB_BITS(HB_BITS)) u_clk_rst (
    .clk_in   (clk_in),
    .rst_in_n (rst_in_n),
    .clk_dom  (clk_dom),
    .rst_n_dom(rst_n_dom),
    .hb_global(hb_global),
    .hb_dom   (hb_dom)
  );

  for (genvar c = 0; c < NCORE; c++) begin : g_core
    ahbrom_tmr #(.DEPTH(ROM_DEPTH), .INIT_FILE(ROM_INIT)) u_ahbrom (
      .clk       (clk_dom),
      .rst_n     (rst_n_dom),
      .slv_i     (rom_slv_i[c]),
      .slv_o     (rom_slv_o[c]),
      .scrub_pass(rom_scrub_pass[c])
    );

    ahbram_tmr #(.DEPTH(RAM_DEPTH)) u_ahbram (
      .clk       (clk_dom),
      .rst_n     (rst_n_dom),
      .slv_i     (ram_slv_i[c]),
      .slv_o     (ram_slv_o[c]),
      .scrub_pass(ram_scrub_pass[c])
    );

    activity_mon #(.W(CMP_BITS), .ACT_WIN(ACT_WIN)) u_activity (
      .clk  (clk_dom),
      .rst_n(rst_n_dom),
      .bus  (core_bus[c]),
      .act  (act[c])
    );
  end

  bus_vote_compare #(.W(CMP_BITS)) u_compare (
    .clk      (clk_dom),
    .rst_n    (rst_n_dom),
    .core1_bus(core_bus[0]),
    .core2_bus(core_bus[1]),
    .mis      (mis)
  );

  bus_vote_reduce #(.W(CMP_BITS)) u_reduce (
    .clk     (clk_dom),
    .rst_n   (rst_n_dom),
    .mis     (mis),
    .disagree(disagree),
    .fail    (fail)
  );

  always_comb begin
    status.hb_global = hb_global;
    status.hb_dom    = hb_dom;
    status.disagree  = disagree;
    status.fail      = fail;
    status.act_core1 = act[0];
    status.act_core2 = act[1];
  end

  status_if u_status (
    .status (status),
    .pio    (pio),
    .tck    (jtag_tck),
    .sel    (jtag_sel),
    .capture(jtag_capture),
    .shift  (jtag_shift),
    .tdi    (jtag_tdi),
    .tdo    (jtag_tdo)
  );

endmodule
