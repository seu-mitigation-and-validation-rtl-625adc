// AHB slave front end of one TMR domain of an on-chip memory.
//
// Turns AMBA 2.0 AHB transfers into accesses of a synchronous memory port
// with zero wait states for reads and writes. A read presents the word address
// in the address phase, and the (voted) memory word is returned in the data
// phase. A write is registered in the address phase and written in the first
// cycle of its data phase, when HWDATA is valid, with byte enables from HSIZE
// and the low address bits (big-endian lanes, as on SPARC: the byte at offset
// 0 is HWDATA[31:24]). The port cannot read and write in the same cycle, so a
// read whose address phase falls in a write's data phase gets one wait state
// (HREADY low); after it the write has landed and the read sees its data.
//
// With WRITABLE = 0 (ROM) writes are accepted and ignored. Only OKAY
// responses are given. The slave's registers are not voted: each is reloaded
// from the bus every transfer, so an upset lasts at most one transfer.
// Reset is synchronous and active low. The slave's timing, lane order and
// responses are this design's choices; only the AMBA 2.0 AHB bus is given.
module ahb_mem_slave
  import leon3_tmr_pkg::*;
#(
  parameter int unsigned AW       = 13,    // word address bits
  parameter bit          WRITABLE = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  ahb_slv_in_t   slv_i,
  output ahb_slv_out_t  slv_o,
  // memory port
  output logic [AW-1:0] m_addr,
  output logic          m_we,
  output logic [3:0]    m_be,
  output logic [31:0]   m_wdata,
  input  logic [31:0]   m_rdata
);

  logic          acc, rd_next;
  logic          wpend_q;
  logic [AW-1:0] waddr_q;
  logic [3:0]    wbe_q;
  logic [3:0]    be_n;

  // transfer accepted in this address phase
  assign acc     = slv_i.hsel && slv_i.htrans[1] && slv_i.hready;
  // a read of this slave is waiting in the address phase
  assign rd_next = slv_i.hsel && slv_i.htrans[1] && !slv_i.hwrite;

  always_comb begin
    unique case (slv_i.hsize)
      3'd0:    be_n = 4'b1000 >> slv_i.haddr[1:0];
      3'd1:    be_n = slv_i.haddr[1] ? 4'b0011 : 4'b1100;
      default: be_n = 4'b1111;
    endcase
  end

  always_comb begin
    m_we    = wpend_q;
    m_addr  = wpend_q ? waddr_q : slv_i.haddr[AW+1:2];
    m_be    = wbe_q;
    m_wdata = slv_i.hwdata;
    slv_o.hrdata = m_rdata;
    slv_o.hready = !(wpend_q && rd_next);
    slv_o.hresp  = HRESP_OKAY;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wpend_q <= 1'b0;
      waddr_q <= '0;
      wbe_q   <= '0;
    end else begin
      wpend_q <= acc && slv_i.hwrite && WRITABLE;
      if (acc && slv_i.hwrite) begin
        waddr_q <= slv_i.haddr[AW+1:2];
        wbe_q   <= be_n;
      end
    end
  end

  // Only byte, halfword and word transfers exist on a 32-bit bus.
  always_ff @(posedge clk) begin
    if (rst_n && acc) assert (slv_i.hsize <= 3'd2)
      else $error("AHB transfer wider than the 32-bit bus");
  end

endmodule
