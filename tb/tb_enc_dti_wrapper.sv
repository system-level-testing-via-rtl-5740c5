// tb_enc_dti_wrapper: the encryption-side wrapper.
//
// Normal mode: transfers reach the core (core_hsel follows hsel) and the
// core's response is returned.  Test mode: the core is cut off, ten pattern
// writes over the bus plus ten serial copies give done=1, pass=1 read back
// over the bus; a second run with one serial copy differing in one bit gives
// done=1, pass=0; the verdict must not appear before the last word arrives.
module tb_enc_dti_wrapper;
  import dti_pkg::*;

  localparam int NP = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      test_mode = 0;
  ahb_m2s_t  m2s;
  logic      hsel, hready;
  ahb_s2m_t  s2m, core_s2m;
  logic      core_hsel;
  dti_link_t link;
  logic      test_done, test_pass;

  enc_dti_wrapper #(.NUM_PAT(NP)) dut (
    .clk, .rst_n, .test_mode, .m2s, .hsel, .hready, .s2m,
    .core_hsel, .core_s2m, .link, .test_done, .test_pass
  );

  assign hready = s2m.hreadyout;
  // core stand-in: answers every read with a fixed word
  always_comb begin
    core_s2m = AHB_S2M_IDLE;
    core_s2m.hrdata = 32'hC0DE_C0DE;
  end

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus(input logic wr, input logic [31:0] d, output logic [31:0] rd);
    @(negedge clk);
    m2s = '0; m2s.htrans = HTRANS_NONSEQ; m2s.hwrite = wr; m2s.haddr = ENC_BASE; hsel = 1;
    #1 check(core_hsel == !test_mode, "core_hsel follows mode");
    @(negedge clk);
    m2s.htrans = HTRANS_IDLE; hsel = 0; m2s.hwdata = d;
    #1 rd = s2m.hrdata;
    @(negedge clk);
  endtask

  task automatic serial(input logic [31:0] w);
    for (int i = 31; i >= 0; i--) begin
      @(negedge clk);
      link.valid = 1; link.data = w[i];
    end
    @(negedge clk) link = '0;
  endtask

  task automatic run(input int bad_word);
    logic [31:0] rd, pats [NP];
    test_mode = 1;
    for (int i = 0; i < NP; i++) pats[i] = $urandom;
    for (int i = 0; i < NP; i++) begin
      bus(1, pats[i], rd);
      serial(i == bad_word ? pats[i] ^ 32'h0001_0000 : pats[i]);
      if (i < NP - 1) begin
        bus(0, 0, rd);
        check(rd[0] == 1'b0, "no verdict before all words");
      end
    end
    repeat (3) @(negedge clk);
    bus(0, 0, rd);
    check(rd[0] == 1'b1, "verdict done");
    check(rd[1] == (bad_word < 0), $sformatf("verdict pass=%0d with bad word %0d", rd[1], bad_word));
    check(test_done && test_pass == (bad_word < 0), "verdict outputs");
    test_mode = 0;
    @(negedge clk);
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    m2s = '0; hsel = 0; link = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    bus(0, 0, rd);
    check(rd == 32'hC0DE_C0DE, "normal mode read reaches the core");
    run(-1);
    run(7);
    run(-1);
    bus(0, 0, rd);
    check(rd == 32'hC0DE_C0DE, "normal mode after the test");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
