// tb_cpu_dti_wrapper: the processor-side wrapper.  Checks that the bus
// signals pass straight through, that serial words sent in test mode are
// stored in order and counted, that words in normal mode are ignored, that
// entering test mode clears the count, and that at most NUM_PAT words are
// kept.
module tb_cpu_dti_wrapper;
  import dti_pkg::*;

  localparam int NP = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        test_mode = 0, hsel = 0, cpu_hsel, hready = 1;
  ahb_m2s_t    m2s = '0;
  ahb_s2m_t    s2m, cpu_s2m;
  logic [3:0]  rd_idx = 0, rx_count;
  logic [31:0] rd_word;
  dti_link_t   link;

  cpu_dti_wrapper #(.NUM_PAT(NP)) dut (
    .clk, .rst_n, .test_mode, .m2s, .hsel, .hready, .s2m, .cpu_hsel, .cpu_s2m,
    .rd_idx, .rd_word, .rx_count, .link
  );

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic serial(input logic [31:0] w);
    for (int i = 31; i >= 0; i--) begin
      @(negedge clk);
      link.valid = 1; link.data = w[i];
    end
    @(negedge clk) link = '0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w [12];
    link = '0;
    cpu_s2m = '{hrdata: 32'hABCD_0123, hreadyout: 1'b0, hresp: 1'b1};
    repeat (2) @(negedge clk);
    rst_n = 1;
    hsel = 1;
    #1 check(cpu_hsel == 1 && s2m == cpu_s2m, "bus passes through");
    hsel = 0;
    #1 check(cpu_hsel == 0, "hsel passes through");
    serial(32'h1234_5678);
    @(negedge clk) check(rx_count == 0, "normal-mode serial word ignored");
    for (int r = 0; r < 2; r++) begin
      test_mode = 1;
      @(negedge clk);
      check(rx_count == 0, "count cleared on entering test mode");
      for (int i = 0; i < 12; i++) begin
        w[i] = $urandom;
        serial(w[i]);
        @(negedge clk);
        check(32'(rx_count) == ((i + 1 < NP) ? i + 1 : NP), $sformatf("count %0d after %0d words", rx_count, i + 1));
      end
      for (int i = 0; i < NP; i++) begin
        rd_idx = 4'(i);
        #1 check(rd_word == w[i], $sformatf("buffer word %0d = %h, expected %h", i, rd_word, w[i]));
      end
      rd_idx = 4'd12;
      #1 check(rd_word == 0, "index past the buffer reads zero");
      test_mode = 0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
