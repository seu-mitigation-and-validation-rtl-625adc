// Mitigated on-chip RAM of a LEON3 system: a triplicated, self-scrubbing AHB
// slave.
//
// Each TMR domain has its own AHB slave front end (ahb_mem_slave) driving its
// own copy of the memory through the copy's processor port; every domain
// reads the majority of the three copies. A scrubber per domain repairs the
// copies in the background through the second memory port (tmr_scrub_mem),
// and is paused in every cycle in which the processor writes, so a scrub
// write never races a processor write.
//
// Interface: per-domain clock, synchronous active-low reset, AHB slave input
// and output structures. Zero-wait-state reads and writes, one wait state for
// a read right after a write. scrub_pass pulses when a domain's scrubber has
// passed over the whole memory. DEPTH is in 32-bit words.
module ahbram_tmr
  import leon3_tmr_pkg::*;
#(
  parameter int unsigned DEPTH = 8192,
  localparam int unsigned AW   = $clog2(DEPTH)
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
    ahb_mem_slave #(.AW(AW), .WRITABLE(1'b1)) u_slave (
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

  tmr_scrub_mem #(.DEPTH(DEPTH), .DW(32), .WRITABLE(1'b1)) u_mem (
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
