// cpu_dti_wrapper: DTI wrapper in front of the microprocessor.
//
// On this side the comparison is left to the processor itself, so the
// wrapper is small: it passes the AHB slave signals straight through to the
// processor's bus port and, in test mode, collects the serial copy of each
// test word arriving on the DTI link into a buffer of NUM_PAT words.  The
// processor reads the buffer through a simple read port (rd_idx -> rd_word,
// combinational) and sees how many words have arrived on rx_count.  Entering
// test mode clears the count.  The read port is this design's choice; the
// system description only says the processor performs the check.
//
// Timing: a word is in the buffer and counted one cycle after its last bit
// was received.
//
// With ONLINE = 1 the wrapper serves the on-line scheme instead: it checks
// every write to the processor itself with dti_parity_check (parity bits of
// the bytes over the DTI link, ERROR response on a mismatch); the buffer
// port then reads zero and rx_count counts the checked writes, saturating.
// m2s and hready are only used in this scheme.
module cpu_dti_wrapper
  import dti_pkg::*;
#(
  parameter int unsigned NUM_PAT = num_patterns(DATA_W),
  parameter int unsigned CW      = $clog2(NUM_PAT + 1),
  parameter bit          ONLINE  = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              test_mode,
  // bus side (slave)
  input  ahb_m2s_t          m2s,
  input  logic              hsel,
  input  logic              hready,
  output ahb_s2m_t          s2m,
  // processor side
  output logic              cpu_hsel,
  input  ahb_s2m_t          cpu_s2m,
  input  logic [CW-1:0]     rd_idx,
  output logic [DATA_W-1:0] rd_word,
  output logic [CW-1:0]     rx_count,
  // DTI link from the I/O side
  input  dti_link_t         link
);

  assign cpu_hsel = hsel;

  if (!ONLINE) begin : g_offline
    logic [DATA_W-1:0] dti_buf [NUM_PAT];
    logic              mode_q;
    logic              rx_valid;
    logic [DATA_W-1:0] rx_word;

    dti_serial_rx #(.W(DATA_W)) u_rx (
      .clk, .rst_n, .link, .word_valid(rx_valid), .word(rx_word)
    );

    assign s2m = cpu_s2m;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        mode_q   <= 1'b0;
        rx_count <= '0;
        for (int i = 0; i < NUM_PAT; i++) dti_buf[i] <= '0;
      end else begin
        mode_q <= test_mode;
        if (test_mode && !mode_q) begin
          rx_count <= '0;
        end else if (test_mode && rx_valid && 32'(rx_count) < NUM_PAT) begin
          dti_buf[rx_count] <= rx_word;
          rx_count          <= rx_count + 1'b1;
        end
      end
    end

    always_comb begin
      rd_word = '0;
      if (32'(rd_idx) < NUM_PAT) rd_word = dti_buf[rd_idx];
    end

  end else begin : g_online
    logic             par_valid, chk, err;
    logic [PAR_W-1:0] par;

    dti_serial_rx #(.W(PAR_W)) u_rx (
      .clk, .rst_n, .link, .word_valid(par_valid), .word(par)
    );

    dti_parity_check u_chk (
      .clk, .rst_n, .m2s, .hsel, .hready, .s2m, .inner_s2m(cpu_s2m),
      .par_valid, .par, .chk, .err
    );

    assign rd_word = '0;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) rx_count <= '0;
      else if (chk && rx_count != '1) rx_count <= rx_count + 1'b1;
    end
  end

endmodule
