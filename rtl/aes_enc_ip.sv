// aes_enc_ip: the encryption core as an AHB slave.
//
// Wraps aes_core with a small register file.  Register map (byte offsets in
// the slave's region, words of 32 bits, word 0 is the most significant):
//   0x00-0x0C  KEY  (write/read)   128-bit cipher key
//   0x10-0x1C  DIN  (write/read)   plaintext block
//   0x20       CTRL write: bit 0 = 1 starts an encryption
//              STATUS read: bit 0 = done (set when a result is ready, cleared
//              by the next start), bit 1 = busy
//   0x30-0x3C  DOUT (read)         ciphertext block
// Other offsets read as zero and ignore writes.  The system description only
// calls for an AES encryption core on the bus; the register map is this
// design's choice.
//
// Timing: zero-wait-state slave (hreadyout always 1, OKAY responses); a
// write takes effect in the cycle its data phase completes (hready high); the
// result is ready 10 cycles after the start write.
module aes_enc_ip
  import dti_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  ahb_m2s_t m2s,
  input  logic     hsel,
  input  logic     hready,
  output ahb_s2m_t s2m
);

  logic [127:0] key_q, din_q, dout;
  logic         busy, done, done_q, start;
  logic         dp_wr, dp_rd;
  logic [7:0]   dp_off;

  aes_core u_core (
    .clk, .rst_n, .start, .key(key_q), .din(din_q), .busy, .done, .dout
  );

  // Address phase capture
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_wr  <= 1'b0;
      dp_rd  <= 1'b0;
      dp_off <= '0;
    end else if (hready) begin
      dp_wr  <= hsel && m2s.htrans[1] && m2s.hwrite;
      dp_rd  <= hsel && m2s.htrans[1] && !m2s.hwrite;
      dp_off <= m2s.haddr[7:0];
    end
  end

  assign start = dp_wr && hready && (dp_off == AES_CTRL) && m2s.hwdata[0];

  // Data phase: register writes
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q  <= '0;
      din_q  <= '0;
      done_q <= 1'b0;
    end else begin
      if (dp_wr && hready) begin
        if (dp_off[7:4] == AES_KEY0[7:4]) key_q[127-32*dp_off[3:2] -: 32] <= m2s.hwdata;
        if (dp_off[7:4] == AES_DIN0[7:4]) din_q[127-32*dp_off[3:2] -: 32] <= m2s.hwdata;
      end
      if (start && !busy) done_q <= 1'b0;
      else if (done)      done_q <= 1'b1;
    end
  end

  always_comb begin
    s2m = AHB_S2M_IDLE;
    if (dp_rd) begin
      unique case (dp_off[7:4])
        AES_KEY0[7:4]:  s2m.hrdata = key_q[127-32*dp_off[3:2] -: 32];
        AES_DIN0[7:4]:  s2m.hrdata = din_q[127-32*dp_off[3:2] -: 32];
        AES_CTRL[7:4]:  s2m.hrdata = (dp_off[3:2] == 2'd0) ? {30'b0, busy, done_q} : '0;
        AES_DOUT0[7:4]: s2m.hrdata = dout[127-32*dp_off[3:2] -: 32];
        default:        s2m.hrdata = '0;
      endcase
    end
  end

endmodule
