// ahb_bus: single-master AMBA AHB-Lite interconnect.
//
// The I/O core is the only master.  The address decoder compares the upper
// address bits of the address phase with each slave's base and raises that
// slave's hsel.  The slave chosen in the address phase is remembered for the
// data phase, where its hrdata/hreadyout/hresp are returned to the master and
// its hreadyout becomes the shared hready that every slave sees.  An address
// that hits no slave is answered by a built-in default slave: an IDLE or
// BUSY transfer gets OKAY, a real transfer gets the two-cycle ERROR response
// of the AHB protocol.  Only single-master AHB-Lite is modelled; the address
// map is this design's choice (see dti_pkg).
//
// Timing: purely combinational paths plus one register per slave for the
// data-phase select.
module ahb_bus
  import dti_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = 2,
  parameter logic [NUM_SLAVES-1:0][ADDR_W-1:0] BASE = {CPU_BASE, ENC_BASE},
  parameter logic [ADDR_W-1:0] MASK = REGION_MASK
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // master side
  input  ahb_m2s_t              m2s,
  output ahb_s2m_t              m_s2m,
  // slave side: the m2s bundle is shared by all slaves
  output logic [NUM_SLAVES-1:0] hsel,
  output logic                  hready,
  input  ahb_s2m_t              s_s2m [NUM_SLAVES]
);

  logic [NUM_SLAVES-1:0] dp_sel;     // slave owning the data phase
  logic                  dp_default; // default slave owns a real transfer
  logic                  err_second; // second cycle of an ERROR response
  logic                  active;

  assign active = m2s.htrans == HTRANS_NONSEQ || m2s.htrans == HTRANS_SEQ;

  always_comb begin
    for (int s = 0; s < NUM_SLAVES; s++) begin
      hsel[s] = (m2s.haddr & MASK) == BASE[s];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_sel     <= '0;
      dp_default <= 1'b0;
      err_second <= 1'b0;
    end else begin
      if (hready) begin
        dp_sel     <= hsel;
        dp_default <= active && (hsel == '0);
        err_second <= 1'b0;
      end else if (dp_default && !err_second) begin
        err_second <= 1'b1;
      end
    end
  end

  always_comb begin
    m_s2m = AHB_S2M_IDLE;
    if (dp_default) begin
      m_s2m.hresp     = 1'b1;
      m_s2m.hreadyout = err_second;
    end else begin
      for (int s = 0; s < NUM_SLAVES; s++) begin
        if (dp_sel[s]) m_s2m = s_s2m[s];
      end
    end
  end

  assign hready = m_s2m.hreadyout;

  a_onehot_decode: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hsel));
  a_hold_while_wait: assert property (@(posedge clk) disable iff (!rst_n)
    !hready && active |=> $stable(m2s.haddr) && $stable(m2s.htrans));

endmodule
