// aes_core: iterative AES-128 encryption (FIPS-197).
//
// One round per clock cycle.  start loads the plaintext XORed with the key
// (the initial AddRoundKey) and the key into the round-key register; each
// following cycle applies SubBytes, ShiftRows, MixColumns (skipped in round
// 10) and AddRoundKey with the next round key, which is expanded on the fly
// from the previous one.  Byte order follows FIPS-197: bits [127:120] are
// byte 0 (row 0, column 0), the state is stored column by column.
//
// Interface: start (one cycle, ignored while busy), key, din; done pulses
// for one cycle with dout valid, and dout holds until the next start.
// Timing: done comes 10 cycles after start.  The cipher follows the
// standard; the round-per-cycle structure is this design's choice.
module aes_core
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] din,
  output logic         busy,
  output logic         done,
  output logic [127:0] dout
);

  logic [7:0] SBOX [256];
  for (genvar v = 0; v < 256; v++) begin : g_sbox
    assign SBOX[v] = sbox(8'(v));
  end

  logic [127:0] state_q, rk_q;
  logic [3:0]   round;
  logic [7:0]   rcon;

  // Round function
  logic [127:0] sb, sr, mc, next_state;
  logic [127:0] next_rk;
  logic [31:0]  t;

  always_comb begin
    for (int i = 0; i < 16; i++) sb[127-8*i -: 8] = SBOX[state_q[127-8*i -: 8]];
    // ShiftRows: byte (r, c) at index 4c + r takes (r, c + r mod 4)
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sr[127-8*(4*c+r) -: 8] = sb[127-8*(4*((c+r)%4)+r) -: 8];
    for (int c = 0; c < 4; c++) mc[127-32*c -: 32] = mix_column(sr[127-32*c -: 32]);
    // Key expansion
    t = {SBOX[rk_q[23:16]] ^ rcon, SBOX[rk_q[15:8]], SBOX[rk_q[7:0]], SBOX[rk_q[31:24]]};
    next_rk[127:96] = rk_q[127:96] ^ t;
    next_rk[95:64]  = rk_q[95:64]  ^ next_rk[127:96];
    next_rk[63:32]  = rk_q[63:32]  ^ next_rk[95:64];
    next_rk[31:0]   = rk_q[31:0]   ^ next_rk[63:32];
    next_state = ((round == 4'd10) ? sr : mc) ^ next_rk;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      rk_q    <= '0;
      round   <= '0;
      rcon    <= 8'h01;
      busy    <= 1'b0;
      done    <= 1'b0;
      dout    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          state_q <= din ^ key;
          rk_q    <= key;
          round   <= 4'd1;
          rcon    <= 8'h01;
          busy    <= 1'b1;
        end
      end else begin
        state_q <= next_state;
        rk_q    <= next_rk;
        rcon    <= xtime(rcon);
        if (round == 4'd10) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          dout  <= next_state;
          round <= '0;
        end else begin
          round <= round + 1'b1;
        end
      end
    end
  end

endmodule
