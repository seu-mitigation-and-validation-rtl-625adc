// Mitigated boot ROM of a LEON3 system: a triplicated, self-scrubbing,
// read-only AHB slave.
//
// The ROM holds the boot loader and the compressed application. It is built
// like the mitigated RAM (ahbram_tmr): three copies of a dual-port block RAM,
// one AHB slave front end per TMR domain reading its own copy, voted read
// data, and a scrubber per domain that uses the otherwise unused second port
// to rewrite every word with the majority of the three copies. Processor
// writes are accepted and ignored, so the scrubber never pauses.
//
// INIT_FILE names a hex file with the contents (one 32-bit word per line); it
// is loaded into all three copies. Interface and timing are those of
// ahbram_tmr: zero-wait-state reads, data in the cycle after the address.
module ahbrom_tmr
  import leon3_tmr_pkg::*;
#(
  parameter int unsigned DEPTH     = 8192,
  parameter string       INIT_FILE = "",
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic         [NDOM-1:0] clk,
  input  logic         [NDOM-1:0] rst_n,
  input  ahb_slv_in_t  [NDOM-1:0] slv_i,
  output ahb_slv_out_t [NDOM-1:0] slv_o,
  output logic         [NDOM-1:0] scrub_pass
);

  logic [NDOM-1:0][AW-1:0] m_addr;
  logic [NDOM-1:0]         m_we;
  logic [NDOM-1:0][3:0]    m_be;
  logic [NDOM-1:0][31:0]   m_wdata, m_rdata;

  for (genvar d = 0; d < NDOM; d++) begin : g_dom
    ahb_mem_slave #(.AW(AW), .WRITABLE(1'b0)) u_slave (
      .clk    (clk[d]),
      .rst_n  (rst_n[d]),
      .slv_i  (slv_i[d]),
      .slv_o  (slv_o[d]),
      .m_addr (m_addr[d]),
      .m_we   (m_we[d]),
      .m_be   (m_be[d]),
      .m_wdata(m_wdata[d]),
      .m_rdata(m_rdata[d])
    );
  end

  tmr_scrub_mem #(.DEPTH(DEPTH), .DW(32), .WRITABLE(1'b0), .INIT_FILE(INIT_FILE)) u_mem (
    .clk       (clk),
    .rst_n     (rst_n),
    .p_addr    (m_addr),
    .p_we      (m_we),
    .p_be      (m_be),
    .p_wdata   (m_wdata),
    .p_rdata   (m_rdata),
    .scrub_pass(scrub_pass)
  );

endmodule
