// leon3_model: behavioural stand-in for the microprocessor and its memory,
// for simulation only.
//
// It answers AHB transfers in the processor region with a 4096-word memory
// (zero wait states).  When test_mode rises it clears its result word; once
// the DTI wrapper reports NUM_PAT received words, it reads them one per cycle
// through the wrapper's read port, compares each with the word the bus wrote
// at CPU_TEST_DATA + 4*i, and posts {pass, done} at CPU_TEST_RESULT -- the
// check the real processor performs in software.  stuck1_mask ORs bits into
// the write data it sees, modelling a stuck-at-1 fault on its bus connection.
module leon3_model
  import dti_pkg::*;
#(
  parameter int unsigned NUM_PAT = 10,
  parameter int unsigned CW      = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              test_mode,
  input  ahb_m2s_t          m2s,
  input  logic              hsel,
  input  logic              hready,
  output ahb_s2m_t          s2m,
  output logic [CW-1:0]     dti_idx,
  input  logic [DATA_W-1:0] dti_word,
  input  logic [CW-1:0]     dti_count,
  input  logic [DATA_W-1:0] stuck1_mask
);
  localparam int unsigned TD = CPU_TEST_DATA / 4;
  localparam int unsigned TR = CPU_TEST_RESULT / 4;

  logic [DATA_W-1:0] mem [4096];
  logic              dp_wr, dp_rd, mode_q, checking, posted, ok;
  logic [11:0]       dp_idx;

  initial for (int i = 0; i < 4096; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dp_wr <= 0; dp_rd <= 0; dp_idx <= '0; mode_q <= 0;
      checking <= 0; posted <= 0; ok <= 1; dti_idx <= '0;
    end else begin
      if (hready) begin
        dp_wr  <= hsel && m2s.htrans[1] && m2s.hwrite;
        dp_rd  <= hsel && m2s.htrans[1] && !m2s.hwrite;
        dp_idx <= m2s.haddr[13:2];
      end
      if (dp_wr) mem[dp_idx] <= m2s.hwdata | stuck1_mask;
      mode_q <= test_mode;
      if (test_mode && !mode_q) begin
        mem[TR]  <= '0;
        posted   <= 0;
        checking <= 0;
        ok       <= 1;
        dti_idx  <= '0;
      end else if (test_mode && !posted && !checking && 32'(dti_count) == NUM_PAT) begin
        checking <= 1;
        dti_idx  <= '0;
      end else if (checking) begin
        if (mem[TD + 32'(dti_idx)] != dti_word) ok <= 0;
        if (32'(dti_idx) == NUM_PAT - 1) begin
          checking <= 0;
          posted   <= 1;
          mem[TR]  <= {30'b0, ok && (mem[TD + 32'(dti_idx)] == dti_word), 1'b1};
        end else begin
          dti_idx <= dti_idx + 1'b1;
        end
      end
    end
  end

  always_comb begin
    s2m = AHB_S2M_IDLE;
    if (dp_rd) s2m.hrdata = mem[dp_idx];
  end
endmodule
