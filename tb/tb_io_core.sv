// tb_io_core: the I/O core against a testbench bus slave and DTI model.
//
// The slave records every transfer; the DTI model drops dti_ready for 32
// cycles after each test write.  Checks: after reset the core enters test
// mode and writes the 10 reference patterns (computed here from the counting
// sequence) to the encryption region and then to the processor region, never
// while dti_ready is low; it polls both verdicts; with both passing it enters
// normal mode and carries out host reads and writes; a failing encryption
// verdict and, in a second run, a failing processor verdict keep it out of
// normal mode until start_test reruns the test.
module tb_io_core;
  import dti_pkg::*;

  localparam int NP = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ahb_m2s_t    m2s;
  ahb_s2m_t    s2m;
  logic        dti_ready, test_mode, start_test = 0, test_done, test_pass, enc_pass, cpu_pass;
  logic        cmd_valid = 0, cmd_ready, cmd_write = 0, rsp_valid, rsp_err;
  logic [31:0] cmd_addr = 0, cmd_wdata = 0, rsp_rdata;

  io_core #(.NUM_PAT(NP)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // verdicts the slave reports and after how many polls
  logic enc_ok = 1, cpu_ok = 1;
  int   enc_polls = 0, cpu_polls = 0;

  // bus slave and DTI model
  logic [31:0] wr_addr [$], wr_data [$];
  logic        dp_act, dp_wr;
  logic [31:0] dp_addr;
  int          dti_busy = 0, stalls = 0;
  assign dti_ready = (dti_busy == 0);
  always @(posedge clk) begin
    if (!rst_n) begin
      dp_act <= 0; dp_wr <= 0;
    end else begin
      if (dp_act && dp_wr) begin
        wr_addr.push_back(dp_addr);
        wr_data.push_back(m2s.hwdata);
      end
      if (dp_act && !dp_wr) begin
        if (dp_addr == (ENC_BASE | 32'(ENC_TEST_STATUS))) enc_polls++;
        if (dp_addr == (CPU_BASE | 32'(CPU_TEST_RESULT))) cpu_polls++;
      end
      if (dti_busy > 0) dti_busy <= dti_busy - 1;
      if (!dti_ready && test_mode) stalls++;
      dp_act  <= m2s.htrans == HTRANS_NONSEQ;
      dp_wr   <= m2s.hwrite;
      dp_addr <= m2s.haddr;
      if (m2s.htrans == HTRANS_NONSEQ) begin
        if (test_mode && m2s.hwrite) begin
          check(dti_ready, "test write only when dti_ready");
          dti_busy <= 33;
        end
      end
    end
  end
  always_comb begin
    s2m = AHB_S2M_IDLE;
    if (dp_act && !dp_wr) begin
      if (dp_addr == (ENC_BASE | 32'(ENC_TEST_STATUS)))
        s2m.hrdata = (enc_polls >= 2) ? {30'b0, enc_ok, 1'b1} : 32'h0;
      else if (dp_addr == (CPU_BASE | 32'(CPU_TEST_RESULT)))
        s2m.hrdata = (cpu_polls >= 3) ? {30'b0, cpu_ok, 1'b1} : 32'h0;
      else
        s2m.hrdata = dp_addr ^ 32'hFFFF_FFFF;
    end
  end

  function automatic logic [31:0] ref_pat(int i);
    logic [31:0] p;
    for (int l = 0; l < 32; l++) p[l] = ((l >> (4 - i / 2)) & 1) ^ (i % 2);
    return p;
  endfunction

  task automatic run_test(input logic e_ok, input logic c_ok);
    enc_ok = e_ok; cpu_ok = c_ok; enc_polls = 0; cpu_polls = 0;
    wr_addr.delete(); wr_data.delete();
    while (!test_mode) @(posedge clk);
    while (test_mode) @(posedge clk);
    check(wr_addr.size() == 2 * NP, $sformatf("%0d test writes, expected %0d", wr_addr.size(), 2 * NP));
    for (int i = 0; i < 2 * NP && i < wr_addr.size(); i++) begin
      logic [31:0] ea;
      ea = (i < NP) ? ENC_BASE + 32'(4 * i) : (CPU_BASE | 32'(CPU_TEST_DATA)) + 32'(4 * (i - NP));
      check(wr_addr[i] == ea, $sformatf("test write %0d to %h, expected %h", i, wr_addr[i], ea));
      check(wr_data[i] == ref_pat(i % NP), $sformatf("test write %0d data %h, expected %h", i, wr_data[i], ref_pat(i % NP)));
    end
    check(enc_polls >= 2 && cpu_polls >= 3, "both verdicts polled");
    check(test_done && test_pass == (e_ok && c_ok), "verdict");
    check(enc_pass == e_ok && cpu_pass == c_ok, "per-target verdicts");
    repeat (3) @(posedge clk);
    check(cmd_ready == (e_ok && c_ok), "host port open only after a passing test");
  endtask

  task automatic host(input logic wr, input logic [31:0] a, input logic [31:0] d, output logic [31:0] rd);
    @(negedge clk);
    cmd_valid = 1; cmd_write = wr; cmd_addr = a; cmd_wdata = d;
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk) cmd_valid = 0;
    while (!rsp_valid) @(negedge clk);
    rd = rsp_rdata;
  endtask

  initial begin
    #500000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_test(1, 1);
    check(stalls >= 2 * NP * 32, "core waited for the serial copies");
    wr_addr.delete(); wr_data.delete();
    host(1, CPU_BASE + 32'h40, 32'hCAFE_F00D, rd);
    check(wr_addr.size() == 1 && wr_addr[0] == CPU_BASE + 32'h40 && wr_data[0] == 32'hCAFE_F00D, "host write");
    host(0, ENC_BASE + 32'h30, 0, rd);
    check(rd == ((ENC_BASE + 32'h30) ^ 32'hFFFF_FFFF), "host read");
    @(negedge clk) start_test = 1;
    @(negedge clk) start_test = 0;
    run_test(0, 1);
    @(negedge clk) start_test = 1;
    @(negedge clk) start_test = 0;
    run_test(1, 0);
    @(negedge clk) start_test = 1;
    @(negedge clk) start_test = 0;
    run_test(1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
