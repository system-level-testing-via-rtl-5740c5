// tb_io_dti_wrapper: drives AHB write and read transfers as the I/O core
// would and decodes both serial links.  A test-mode write to the encryption
// or processor region must appear, bit for bit, on that target's link only,
// starting the cycle after the data phase and lasting 32 cycles, with
// dti_ready low meanwhile.  Reads, writes outside the two regions and writes
// in normal mode must produce nothing on the links.
// A second instance built for the on-line scheme (ONLINE = 1) must send, for
// every write in either mode, the four even-parity bits of the word's bytes
// on the addressed target's link, taking hwdata without waiting for hready.
module tb_io_dti_wrapper;
  import dti_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      test_mode = 0;
  ahb_m2s_t  m2s;
  logic      hready = 1;
  logic      dti_ready;
  dti_link_t link [2];

  io_dti_wrapper #(.W(32)) dut (.clk, .rst_n, .test_mode, .m2s, .hready, .dti_ready, .link);

  // on-line variant, observed on the same bus
  logic      on_ready;
  dti_link_t on_link [2];
  io_dti_wrapper #(.W(32), .ONLINE(1'b1)) dut_on (
    .clk, .rst_n, .test_mode, .m2s, .hready, .dti_ready(on_ready), .link(on_link)
  );
  logic [3:0] on_sh [2];
  int         on_nb [2];
  logic [3:0] on_got [2][$];
  always @(posedge clk) begin
    for (int t = 0; t < 2 && rst_n; t++) begin
      if (on_link[t].valid) begin
        on_sh[t] = {on_sh[t][2:0], on_link[t].data};
        on_nb[t]++;
        if (on_nb[t] == 4) begin on_got[t].push_back(on_sh[t]); on_nb[t] = 0; end
      end else on_nb[t] = 0;
    end
  end
  function automatic logic [3:0] ref_par(input logic [31:0] w);
    logic [3:0] p;
    for (int k = 0; k < 4; k++) p[k] = ^w[8*k +: 8];
    return p;
  endfunction

  int checks = 0, failures = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // link decoders
  logic [31:0] sh [2];
  int          nb [2];
  logic [31:0] got [2][$];
  int          busy_cycles = 0;
  always @(posedge clk) begin
    if (rst_n && !dti_ready) busy_cycles++;
    for (int t = 0; t < 2 && rst_n; t++) begin
      if (link[t].valid) begin
        sh[t] = {sh[t][30:0], link[t].data};
        nb[t]++;
        if (nb[t] == 32) begin got[t].push_back(sh[t]); nb[t] = 0; end
      end else begin
        check(nb[t] == 0, "no partial word on a link");
        nb[t] = 0;
      end
    end
  end

  logic [3:0] on_exp [2][$];
  task automatic xfer(input logic wr, input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    while (!dti_ready || !on_ready) @(negedge clk);
    if (wr && ((a & REGION_MASK) == ENC_BASE || (a & REGION_MASK) == CPU_BASE))
      on_exp[(a & REGION_MASK) == CPU_BASE].push_back(ref_par(d));
    m2s = '0; m2s.htrans = HTRANS_NONSEQ; m2s.hwrite = wr; m2s.haddr = a; m2s.hsize = 3'b010;
    @(negedge clk);
    m2s.htrans = HTRANS_IDLE; m2s.hwdata = d;
    // one wait state on some transfers
    if (a[2]) begin hready = 0; @(negedge clk); hready = 1; end
    @(negedge clk);
    m2s.hwdata = '0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    for (int t = 0; t < 2; t++) begin
      check(on_got[t].size() == on_exp[t].size() && on_exp[t].size() > 0,
            $sformatf("on-line link %0d carried %0d parity words, expected %0d", t, on_got[t].size(), on_exp[t].size()));
      while (on_got[t].size() > 0 && on_exp[t].size() > 0) begin
        logic [3:0] g, e;
        g = on_got[t].pop_front(); e = on_exp[t].pop_front();
        check(g == e, $sformatf("on-line link %0d parity %b, expected %b", t, g, e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp [2][$];
    nb[0] = 0; nb[1] = 0; on_nb[0] = 0; on_nb[1] = 0;
    m2s = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // normal mode: nothing on the links
    xfer(1, ENC_BASE, 32'h1111_2222);
    xfer(1, CPU_BASE, 32'h3333_4444);
    repeat (40) @(negedge clk);
    check(got[0].size() == 0 && got[1].size() == 0, "no copies in normal mode");
    check(busy_cycles == 0, "dti_ready stays high in normal mode");
    test_mode = 1;
    for (int k = 0; k < 12; k++) begin
      logic [31:0] d;
      logic        t;
      d = $urandom;
      t = k[0] ^ k[2];
      xfer(1, (t ? CPU_BASE : ENC_BASE) + 32'(4 * k), d);
      exp[t].push_back(d);
    end
    xfer(0, ENC_BASE, 32'h0);           // read: no copy
    xfer(1, 32'h1234_0000, 32'h5555);   // unmapped: no copy
    repeat (40) @(negedge clk);
    // per word: one data-phase cycle, one wait state on odd k, 32 shift cycles
    check(busy_cycles == 12 * 33 + 6, $sformatf("dti_ready low for %0d cycles, expected %0d", busy_cycles, 12 * 33 + 6));
    for (int t = 0; t < 2; t++) begin
      check(got[t].size() == exp[t].size(), $sformatf("link %0d carried %0d words, expected %0d", t, got[t].size(), exp[t].size()));
      while (got[t].size() > 0 && exp[t].size() > 0) begin
        logic [31:0] g, e;
        g = got[t].pop_front(); e = exp[t].pop_front();
        check(g == e, $sformatf("link %0d word %h, expected %h", t, g, e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
