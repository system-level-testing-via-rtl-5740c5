// tb_dti_parity_check: the on-line write checker.  A testbench slave answers
// with zero wait states; the testbench delivers the parity word for each
// write after a random delay, sometimes with one bit flipped.  Checks: a
// write's data phase is held until the parity arrives, then completes with
// the slave's OKAY when the parity agrees and with a two-cycle ERROR when it
// does not; chk/err pulse once per write; reads are not held.
module tb_dti_parity_check;
  import dti_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ahb_m2s_t         m2s;
  logic             hsel;
  ahb_s2m_t         s2m, inner_s2m;
  logic             par_valid;
  logic [PAR_W-1:0] par;
  logic             chk, err;

  dti_parity_check dut (
    .clk, .rst_n, .m2s, .hsel, .hready(s2m.hreadyout), .s2m, .inner_s2m,
    .par_valid, .par, .chk, .err
  );

  always_comb inner_s2m = '{hrdata: 32'h600D_DA7A, hreadyout: 1'b1, hresp: 1'b0};

  int checks = 0, failures = 0;
  int n_chk = 0, n_err = 0, n_ok = 0, n_bad = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (rst_n && chk) n_chk++;
    if (rst_n && err) n_err++;
  end

  function automatic logic [3:0] ref_par(input logic [31:0] w);
    logic [3:0] p;
    for (int k = 0; k < 4; k++) begin
      int ones;
      ones = 0;
      for (int b = 0; b < 8; b++) ones += w[8*k+b];
      p[k] = (ones % 2 == 1);    // makes the count of ones even
    end
    return p;
  endfunction

  initial begin
    #500000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m2s = '0; hsel = 0; par_valid = 0; par = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 60; k++) begin
      logic [31:0] d;
      logic        wr, bad;
      int          delay, held;
      d = $urandom; wr = (k % 4 != 3); bad = ($urandom_range(0, 3) == 0);
      delay = $urandom_range(0, 6);
      @(negedge clk);
      m2s.htrans = HTRANS_NONSEQ; m2s.hwrite = wr; hsel = 1; m2s.haddr = ENC_BASE;
      @(negedge clk);
      m2s.htrans = HTRANS_IDLE; hsel = 0; m2s.hwdata = d;
      held = 0;
      if (wr) begin
        repeat (delay) begin
          #1 check(!s2m.hreadyout && !s2m.hresp, "write held until the parity arrives");
          @(negedge clk);
          held++;
        end
        par_valid = 1; par = ref_par(d) ^ (bad ? 4'b0100 : 4'b0000);
        #1 check(!s2m.hreadyout, "still held in the parity cycle");
        @(negedge clk);
        par_valid = 0;
        #1;
        if (bad) begin
          check(!s2m.hreadyout && s2m.hresp, "first ERROR cycle");
          @(negedge clk); #1;
          check(s2m.hreadyout && s2m.hresp, "second ERROR cycle");
          n_bad++;
        end else begin
          check(s2m.hreadyout && !s2m.hresp, "write completes OKAY");
          n_ok++;
        end
      end else begin
        #1 check(s2m.hreadyout && !s2m.hresp && s2m.hrdata == 32'h600D_DA7A, "read passes through");
      end
      @(negedge clk);
    end
    repeat (2) @(negedge clk);
    check(n_chk == n_ok + n_bad, $sformatf("%0d checks for %0d writes", n_chk, n_ok + n_bad));
    check(n_err == n_bad, $sformatf("%0d errors for %0d bad parities", n_err, n_bad));
    check(n_ok > 0 && n_bad > 0, "good and bad parity both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
