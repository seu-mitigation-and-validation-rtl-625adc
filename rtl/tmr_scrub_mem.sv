// Triplicated memory with voted reads and voted background scrubbing.
//
// Three copies of the memory (one per TMR domain, each a dual-port block RAM)
// hold the same contents. On the processor side (port 1) each domain drives
// its own copy with its own address and write controls, and the three read
// words are voted, one voter per domain, so each domain reads the majority
// word. On the scrubber side (port 0) each domain has a scrubber that walks
// through the addresses, reading in one cycle and writing back, in the next,
// the majority of the three copies' words. The scrubbers' state is voted in a
// feedback loop, so the three scrubbers stay in step and a scrubber upset is
// undone on the next clock. An upset word in one copy is thus masked on reads
// and repaired within one scrub pass (2*DEPTH cycles), which keeps upsets from
// accumulating until two copies of a word disagree with the third.
//
// With WRITABLE = 0 the memory is a ROM: processor writes are ignored and the
// scrubber never pauses. With WRITABLE = 1 a domain's scrubber pauses in every
// cycle in which that domain's processor port writes.
//
// Interface: per-domain clock, synchronous active-low reset and processor port
// (address, write enable, byte enables, write data, voted read data). Read
// data appear one clock after the address. scrub_pass pulses once per
// completed pass of each domain's scrubber.
//
// The structure (three banks, voted read-out, three scrubbers with voted
// feedback on the spare port) follows the published mitigation; the default
// depth of 8192 words is this design's choice, sized so that a pass at 50 MHz
// (327.7 us) stays within the published 400 us scrub period.
module tmr_scrub_mem #(
  parameter int unsigned DEPTH     = 8192,
  parameter int unsigned DW        = 32,
  parameter bit          WRITABLE  = 1'b1,
  parameter string       INIT_FILE = "",
  localparam int unsigned NDOM     = 3,
  localparam int unsigned AW       = $clog2(DEPTH),
  localparam int unsigned NB       = DW / 8
) (
  input  logic [NDOM-1:0]         clk,
  input  logic [NDOM-1:0]         rst_n,
  input  logic [NDOM-1:0][AW-1:0] p_addr,
  input  logic [NDOM-1:0]         p_we,
  input  logic [NDOM-1:0][NB-1:0] p_be,
  input  logic [NDOM-1:0][DW-1:0] p_wdata,
  output logic [NDOM-1:0][DW-1:0] p_rdata,
  output logic [NDOM-1:0]         scrub_pass
);

  logic [NDOM-1:0][AW-1:0] s_addr_q, s_addr_v, s_mem_addr;
  logic [NDOM-1:0]         s_wr_q, s_wr_v, s_mem_we, s_pause;
  logic [NDOM-1:0][DW-1:0] s_rdata, s_wdata_v, m_rdata;

  for (genvar d = 0; d < NDOM; d++) begin : g_dom
    // Scrubber state voters (feedback path).
    tmr_voter #(.W(AW + 1)) u_vote_state (
      .a({s_addr_q[0], s_wr_q[0]}),
      .b({s_addr_q[1], s_wr_q[1]}),
      .c({s_addr_q[2], s_wr_q[2]}),
      .y({s_addr_v[d], s_wr_v[d]})
    );

    // Voted scrub data written back into this copy.
    tmr_voter #(.W(DW)) u_vote_scrub (
      .a(s_rdata[0]), .b(s_rdata[1]), .c(s_rdata[2]), .y(s_wdata_v[d])
    );

    // Voted processor read data of this domain.
    tmr_voter #(.W(DW)) u_vote_read (
      .a(m_rdata[0]), .b(m_rdata[1]), .c(m_rdata[2]), .y(p_rdata[d])
    );

    assign s_pause[d] = WRITABLE && p_we[d];

    mem_scrubber #(.DEPTH(DEPTH)) u_scrubber (
      .clk      (clk[d]),
      .rst_n    (rst_n[d]),
      .pause    (s_pause[d]),
      .addr_v   (s_addr_v[d]),
      .wr_v     (s_wr_v[d]),
      .addr_q   (s_addr_q[d]),
      .wr_q     (s_wr_q[d]),
      .mem_addr (s_mem_addr[d]),
      .mem_we   (s_mem_we[d]),
      .pass_done(scrub_pass[d])
    );

    scrub_bram #(.DEPTH(DEPTH), .DW(DW), .INIT_FILE(INIT_FILE)) u_bram (
      .clk     (clk[d]),
      .a0_addr (s_mem_addr[d]),
      .a0_we   (s_mem_we[d]),
      .a0_wdata(s_wdata_v[d]),
      .a0_rdata(s_rdata[d]),
      .a1_addr (p_addr[d]),
      .a1_we   (WRITABLE && p_we[d]),
      .a1_be   (p_be[d]),
      .a1_wdata(p_wdata[d]),
      .a1_rdata(m_rdata[d])
    );
  end

endmodule
