// io_dti_wrapper: DTI wrapper on the I/O core side.
//
// Watches the I/O core's AHB master signals.  In test mode, every write to
// the encryption region or to the microprocessor region is copied, word by
// word, onto that target's serial DTI link (one link per target, so the copy
// follows the same target as the bus transfer).  The bus itself is not
// touched: this is the second, low-bandwidth path that carries the
// redundant copy of the test data.
//
// Interface: m2s/hready are the master's bus signals (observed only);
// dti_ready tells the I/O core it may issue the next test write; it is low
// from the cycle after the address phase of a captured write until the W bits
// of that word have been shifted out.  It is a register output, so the master
// may use it combinationally to start a transfer.  link[0] goes to the encryption side,
// link[1] to the microprocessor side.
//
// Timing: the word is taken from hwdata in the data phase, and the first bit
// appears on the link in the following cycle; a word takes W cycles.
//
// With ONLINE = 1 the wrapper serves the on-line (concurrent) scheme instead:
// there is no test mode, and for every write to either target it sends the
// PAR_W even-parity bits of the word's bytes (bit PAR_W-1 first).  The
// target holds the data phase until they arrive, so in this scheme hwdata is
// taken in the first data-phase cycle, without waiting for hready.
module io_dti_wrapper
  import dti_pkg::*;
#(
  parameter int unsigned W      = DATA_W,
  parameter bit          ONLINE = 1'b0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      test_mode,
  input  ahb_m2s_t  m2s,
  input  logic      hready,
  output logic      dti_ready,
  output dti_link_t link [2]
);

  typedef enum logic [1:0] {S_IDLE, S_DATA, S_SHIFT} state_t;
  state_t state;

  logic [W-1:0]         shreg;
  logic [$clog2(W)-1:0] nbits;
  logic                 tgt;      // 0 = encryption, 1 = microprocessor

  // bits sent per transfer
  localparam int unsigned NB = ONLINE ? PAR_W : W;

  logic addr_hit_enc, addr_hit_cpu, capture;
  assign addr_hit_enc = (m2s.haddr & REGION_MASK) == ENC_BASE;
  assign addr_hit_cpu = (m2s.haddr & REGION_MASK) == CPU_BASE;
  assign capture = (ONLINE || test_mode) && hready && m2s.hwrite && (m2s.htrans == HTRANS_NONSEQ ||
                   m2s.htrans == HTRANS_SEQ) && (addr_hit_enc || addr_hit_cpu);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      shreg <= '0;
      nbits <= '0;
      tgt   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (capture) begin
          tgt   <= addr_hit_cpu;
          state <= S_DATA;
        end
        S_DATA: if (hready || ONLINE) begin
          if (ONLINE) shreg <= {byte_parity(m2s.hwdata), {(W-PAR_W){1'b0}}};
          else        shreg <= m2s.hwdata[W-1:0];
          nbits <= '0;
          state <= S_SHIFT;
        end
        S_SHIFT: begin
          shreg <= {shreg[W-2:0], 1'b0};
          if (32'(nbits) == NB - 1) state <= S_IDLE;
          else                     nbits <= nbits + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign dti_ready = (state == S_IDLE);

  // The I/O core must wait for dti_ready before it issues a test write.
  a_one_word_at_a_time: assert property (@(posedge clk) disable iff (!rst_n)
    capture |-> state == S_IDLE);

  always_comb begin
    for (int t = 0; t < 2; t++) begin
      link[t].valid = (state == S_SHIFT) && (tgt == t[0]);
      link[t].data  = link[t].valid && shreg[W-1];
    end
  end

endmodule
