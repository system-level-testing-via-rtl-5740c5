// io_core: the I/O core, sole master of the AHB bus.
//
// It has the two operating modes of the test scheme.  After reset (and
// whenever start_test is pulsed in normal mode or after a failed test) it is
// in test mode: it writes the NUM_PAT interconnect test patterns, one word per
// bus write, first into the encryption region and then into the processor
// region.  Before each test write it waits for dti_ready from its DTI wrapper,
// which ships a serial copy of the same word to the same target.  Once the
// last copy has left, it polls the encryption wrapper's verdict and then the
// verdict the processor posts at CPU_TEST_RESULT (bit 0 = done, bit 1 =
// pass).  Both passing puts it in normal mode, where it executes single-word
// read/write commands from the host port (cmd_* / rsp_*); a failure holds it
// in the fail state with the host port closed.  The mode is driven out on
// test_mode for the wrappers.
//
// What follows the system description: test mode before normal mode, the same
// pattern set sent to both targets over the bus and over the DTI, the
// comparison at the targets.  This design's choices: the order of the targets,
// the pattern addresses, the status polling and the host command port.
//
// With ONLINE = 1 (the on-line scheme) there is no test mode: the core starts
// in normal mode, start_test is ignored, and the check of each write happens
// in the target wrappers, which answer ERROR (rsp_err) for a write whose
// parity copy disagrees.  In both schemes a write is only started when
// dti_ready is high.
//
// Timing: transfers are not pipelined; a write or read takes one address and
// at least one data cycle.  In test mode each pattern waits for the previous
// serial copy, so a word costs about DATA_W + 3 cycles.
module io_core
  import dti_pkg::*;
#(
  parameter int unsigned NUM_PAT     = num_patterns(DATA_W),
  parameter int unsigned DRAIN_CYCLES = 4,
  parameter bit          ONLINE       = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  // bus master
  output ahb_m2s_t          m2s,
  input  ahb_s2m_t          s2m,
  // DTI wrapper handshake and mode
  input  logic              dti_ready,
  output logic              test_mode,
  // test control / verdict
  input  logic              start_test,
  output logic              test_done,
  output logic              test_pass,
  output logic              enc_pass,
  output logic              cpu_pass,
  // host command port (normal mode only)
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic              cmd_write,
  input  logic [ADDR_W-1:0] cmd_addr,
  input  logic [DATA_W-1:0] cmd_wdata,
  output logic              rsp_valid,
  output logic [DATA_W-1:0] rsp_rdata,
  output logic              rsp_err
);

  localparam int unsigned IW = $clog2(NUM_PAT + 1);

  typedef enum logic [2:0] {S_START, S_ISSUE, S_DATA, S_DRAIN, S_NORMAL, S_FAIL} state_t;
  typedef enum logic [1:0] {OP_TEST_WR, OP_POLL_ENC, OP_POLL_CPU, OP_HOST} op_t;

  state_t            state;
  op_t               op;
  logic              tgt;          // 0 = encryption, 1 = processor
  logic [IW-1:0]     idx;
  logic [3:0]        drain;
  logic              h_write;
  logic [ADDR_W-1:0] h_addr;
  logic [DATA_W-1:0] h_wdata;
  logic [DATA_W-1:0] pattern;

  pattern_rom #(.N_LINES(DATA_W), .NUM_PAT(NUM_PAT), .IDX_W(IW)) u_rom (
    .idx(idx), .pattern(pattern)
  );

  // Transfer currently being performed
  logic              x_write;
  logic [ADDR_W-1:0] x_addr;
  logic [DATA_W-1:0] x_wdata;
  logic              x_go;

  always_comb begin
    x_write = 1'b0;
    x_addr  = '0;
    x_wdata = '0;
    unique case (op)
      OP_TEST_WR: begin
        x_write = 1'b1;
        x_addr  = (tgt ? (CPU_BASE | ADDR_W'(CPU_TEST_DATA)) : ENC_BASE) + ADDR_W'({idx, 2'b00});
        x_wdata = pattern;
      end
      OP_POLL_ENC: x_addr = ENC_BASE | ADDR_W'(ENC_TEST_STATUS);
      OP_POLL_CPU: x_addr = CPU_BASE | ADDR_W'(CPU_TEST_RESULT);
      OP_HOST: begin
        x_write = h_write;
        x_addr  = h_addr;
        x_wdata = h_wdata;
      end
      default: ;
    endcase
    x_go = (state == S_ISSUE) && (!x_write || dti_ready);
  end

  always_comb begin
    m2s        = '0;
    m2s.htrans = HTRANS_IDLE;
    m2s.hsize  = 3'b010;                 // 32-bit word
    m2s.haddr  = x_addr;
    m2s.hwrite = x_write;
    if (x_go) m2s.htrans = HTRANS_NONSEQ;
    if (state == S_DATA) m2s.hwdata = x_wdata;
  end

  assign cmd_ready = (state == S_NORMAL) && !(start_test && !ONLINE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_START;
      op        <= OP_TEST_WR;
      tgt       <= 1'b0;
      idx       <= '0;
      drain     <= '0;
      test_mode <= 1'b0;
      test_done <= 1'b0;
      test_pass <= 1'b0;
      enc_pass  <= 1'b0;
      cpu_pass  <= 1'b0;
      h_write   <= 1'b0;
      h_addr    <= '0;
      h_wdata   <= '0;
      rsp_valid <= 1'b0;
      rsp_rdata <= '0;
      rsp_err   <= 1'b0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (state)
        S_START: if (ONLINE) begin
          state <= S_NORMAL;
        end else begin
          test_mode <= 1'b1;
          test_done <= 1'b0;
          test_pass <= 1'b0;
          enc_pass  <= 1'b0;
          cpu_pass  <= 1'b0;
          op        <= OP_TEST_WR;
          tgt       <= 1'b0;
          idx       <= '0;
          state     <= S_ISSUE;
        end
        S_ISSUE: if (x_go && s2m.hreadyout) state <= S_DATA;
        S_DATA: if (s2m.hreadyout) begin
          unique case (op)
            OP_TEST_WR: begin
              state <= S_ISSUE;
              if (32'(idx) == NUM_PAT - 1) begin
                idx <= '0;
                if (tgt) begin
                  drain <= '0;
                  state <= S_DRAIN;
                end else begin
                  tgt <= 1'b1;
                end
              end else begin
                idx <= idx + 1'b1;
              end
            end
            OP_POLL_ENC: begin
              state <= S_ISSUE;
              if (s2m.hrdata[0]) begin
                enc_pass <= s2m.hrdata[1] && !s2m.hresp;
                op       <= OP_POLL_CPU;
              end
            end
            OP_POLL_CPU: begin
              state <= S_ISSUE;
              if (s2m.hrdata[0]) begin
                cpu_pass  <= s2m.hrdata[1] && !s2m.hresp;
                test_done <= 1'b1;
                test_pass <= enc_pass && s2m.hrdata[1] && !s2m.hresp;
                test_mode <= 1'b0;
                state     <= (enc_pass && s2m.hrdata[1] && !s2m.hresp) ? S_NORMAL : S_FAIL;
              end
            end
            OP_HOST: begin
              rsp_valid <= 1'b1;
              rsp_rdata <= s2m.hrdata;
              rsp_err   <= s2m.hresp;
              state     <= S_NORMAL;
            end
            default: state <= S_ISSUE;
          endcase
        end
        S_DRAIN: if (dti_ready) begin
          if (32'(drain) == DRAIN_CYCLES) begin
            op    <= OP_POLL_ENC;
            state <= S_ISSUE;
          end else begin
            drain <= drain + 1'b1;
          end
        end
        S_NORMAL: begin
          if (start_test && !ONLINE) begin
            state <= S_START;
          end else if (cmd_valid) begin
            h_write <= cmd_write;
            h_addr  <= cmd_addr;
            h_wdata <= cmd_wdata;
            op      <= OP_HOST;
            state   <= S_ISSUE;
          end
        end
        S_FAIL: if (start_test) state <= S_START;
        default: state <= S_START;
      endcase
    end
  end

endmodule
