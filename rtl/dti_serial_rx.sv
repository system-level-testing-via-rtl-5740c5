// dti_serial_rx: receiving end of the bit-serial DTI link.
//
// The link is a valid/data pair in the bus clock domain.  While link.valid is
// high, one bit per cycle is shifted in, most significant bit first; after W
// bits the assembled word is presented on word for one cycle with word_valid
// high, and the bit counter starts again.  A drop of valid before W bits
// discards the partial word.  The serial format is this design's choice: the
// system description only asks for a simple, low-bandwidth serial link that
// carries a copy of each test word.
//
// Timing: word_valid rises in the cycle after the W-th bit is sampled.
module dti_serial_rx
  import dti_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  dti_link_t     link,
  output logic          word_valid,
  output logic [W-1:0]  word
);

  logic [W-1:0]         shreg;
  logic [$clog2(W)-1:0] nbits;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg      <= '0;
      nbits      <= '0;
      word_valid <= 1'b0;
      word       <= '0;
    end else begin
      word_valid <= 1'b0;
      if (link.valid) begin
        shreg <= {shreg[W-2:0], link.data};
        if (32'(nbits) == W - 1) begin
          nbits      <= '0;
          word       <= {shreg[W-2:0], link.data};
          word_valid <= 1'b1;
        end else begin
          nbits <= nbits + 1'b1;
        end
      end else begin
        nbits <= '0;
      end
    end
  end

endmodule
