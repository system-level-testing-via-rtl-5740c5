// tb_ahb_bus: the AHB-Lite interconnect with two slave models in the
// testbench.  Slave 0 answers with zero wait states, slave 1 inserts a
// random number of wait states.  Random single transfers to both regions and
// to unmapped addresses check: exactly the addressed hsel in the address
// phase, the data-phase response taken from the slave chosen one transfer
// earlier, hready following that slave, and the two-cycle ERROR response of
// the default slave.
module tb_ahb_bus;
  import dti_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ahb_m2s_t   m2s;
  ahb_s2m_t   m_s2m;
  logic [1:0] hsel;
  logic       hready;
  ahb_s2m_t   s_s2m [2];

  ahb_bus #(.NUM_SLAVES(2), .BASE({CPU_BASE, ENC_BASE})) dut (
    .clk, .rst_n, .m2s, .m_s2m, .hsel, .hready, .s_s2m
  );

  int checks = 0, failures = 0;
  int n_wait = 0, n_err = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // slave models: reply with their address tag; slave 1 adds wait states
  logic [31:0] s_addr [2];
  logic        s_act [2];
  int          s_wait;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_act[0] <= 0; s_act[1] <= 0; s_wait <= 0;
    end else begin
      if (hready) begin
        for (int s = 0; s < 2; s++) begin
          s_act[s]  <= hsel[s] && m2s.htrans[1];
          s_addr[s] <= m2s.haddr;
        end
        s_wait <= (hsel[1] && m2s.htrans[1]) ? int'($urandom_range(0, 3)) : 0;
      end else if (s_wait > 0) begin
        s_wait <= s_wait - 1;
      end
    end
  end
  always_comb begin
    s_s2m[0] = '{hrdata: s_addr[0] ^ 32'h0000_5A5A, hreadyout: 1'b1, hresp: 1'b0};
    s_s2m[1] = '{hrdata: s_addr[1] ^ 32'h0000_A5A5, hreadyout: !(s_act[1] && s_wait > 0), hresp: 1'b0};
  end

  initial begin
    #500000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m2s = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      int          sel, waits;
      logic [31:0] a;
      sel = $urandom_range(0, 2);
      a = (sel == 0 ? ENC_BASE : sel == 1 ? CPU_BASE : 32'h2000_0000) | ($urandom & 32'h0000_FFFC);
      @(negedge clk);
      m2s.htrans = HTRANS_NONSEQ; m2s.haddr = a; m2s.hwrite = $urandom;
      #1 check(hsel == (sel == 0 ? 2'b01 : sel == 1 ? 2'b10 : 2'b00), $sformatf("hsel %b for %h", hsel, a));
      check(hready, "bus ready in the address phase");
      @(negedge clk);
      // IDLE in the data phase, with an address aimed elsewhere
      m2s.htrans = HTRANS_IDLE;
      m2s.haddr  = (sel == 1) ? ENC_BASE : CPU_BASE;
      waits = 0;
      #1;
      while (!hready) begin
        if (sel == 2) check(m_s2m.hresp, "first ERROR cycle");
        @(negedge clk); #1;
        waits++;
      end
      if (sel == 0) check(m_s2m.hrdata == (a ^ 32'h5A5A) && !m_s2m.hresp && waits == 0, "slave 0 response");
      if (sel == 1) check(m_s2m.hrdata == (a ^ 32'hA5A5) && !m_s2m.hresp, "slave 1 response");
      if (sel == 2) check(m_s2m.hresp && waits == 1, "default slave ERROR takes two cycles");
      if (sel == 1 && waits > 0) n_wait++;
      if (sel == 2) n_err++;
    end
    // an IDLE cycle to an unmapped address is answered OKAY
    @(negedge clk);
    m2s.htrans = HTRANS_IDLE; m2s.haddr = 32'h2000_0000;
    @(negedge clk);
    #1 check(hready && !m_s2m.hresp, "IDLE to unmapped address answered OKAY");
    check(n_wait > 0 && n_err > 0, "wait states and errors occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
