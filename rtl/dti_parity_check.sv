// dti_parity_check: on-line (concurrent) check of bus writes, used inside the
// target-side DTI wrappers when they are built for the on-line scheme.
//
// For every write to its slave, the I/O-side wrapper sends the even-parity
// bits of the word's bytes over the DTI link.  This checker holds the write's
// data phase (hreadyout low) until those PAR_W bits have arrived, compares
// them with the parity of the hwdata it sees on the bus, and only then
// completes the transfer: with the slave's own response when they agree, or
// with a two-cycle AHB ERROR response when they do not.  A write is thus
// finished only once the side channel has vouched for it.  Reads and idle
// cycles are passed straight through.  The hold-then-respond mechanism and
// the ERROR response are this design's translation of "the operation is
// considered completed only if the channel is certified".
//
// Interface: AHB slave signals on both sides (bus side m2s/hsel/hready/s2m,
// slave side inner_s2m), the received parity word (par_valid/par), and one-
// cycle pulses chk (a write was checked) and err (it failed).
// Timing: a write's data phase lasts PAR_W + 2 cycles (ERROR adds one).
module dti_parity_check
  import dti_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  ahb_m2s_t         m2s,
  input  logic             hsel,
  input  logic             hready,
  output ahb_s2m_t         s2m,
  input  ahb_s2m_t         inner_s2m,
  input  logic             par_valid,
  input  logic [PAR_W-1:0] par,
  output logic             chk,
  output logic             err
);

  typedef enum logic [2:0] {C_IDLE, C_WAIT, C_OK, C_ERR1, C_ERR2} cstate_t;
  cstate_t cs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs  <= C_IDLE;
      chk <= 1'b0;
      err <= 1'b0;
    end else begin
      chk <= 1'b0;
      err <= 1'b0;
      if (hready) begin
        cs <= (hsel && m2s.htrans[1] && m2s.hwrite) ? C_WAIT : C_IDLE;
      end else begin
        unique case (cs)
          C_WAIT: if (par_valid) begin
            chk <= 1'b1;
            if (par == byte_parity(m2s.hwdata)) begin
              cs <= C_OK;
            end else begin
              cs  <= C_ERR1;
              err <= 1'b1;
            end
          end
          C_ERR1:  cs <= C_ERR2;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    s2m = inner_s2m;
    unique case (cs)
      C_WAIT: s2m = '{hrdata: '0, hreadyout: 1'b0, hresp: 1'b0};
      C_ERR1: s2m = '{hrdata: '0, hreadyout: 1'b0, hresp: 1'b1};
      C_ERR2: s2m = '{hrdata: '0, hreadyout: 1'b1, hresp: 1'b1};
      default: ;
    endcase
  end

endmodule
