// enc_dti_wrapper: DTI wrapper in front of the encryption core.
//
// It sits between the AHB bus and the encryption core's slave port.  In
// normal mode it is transparent: the core is selected and answers as usual.
// In test mode the core is cut off and the wrapper is the slave: every write
// into the encryption region is stored as a pattern received over the bus,
// while the serial receiver stores the copy that arrives over the DTI link.
// When NUM_PAT words have arrived on both paths, the two stores are compared
// word for word and the verdict is latched.  Any read of the region in test
// mode returns the verdict: bit 0 = done, bit 1 = pass.  This mirrors the
// debug-transport check of the high-level model (collect the serial copy,
// then compare with what came over the normal channel); storing both sides
// and the status read are this design's choices.  Entering test mode clears
// both stores and the verdict.
//
// Timing: zero-wait-state AHB slave in test mode; the verdict is ready one
// cycle after the last of the 2*NUM_PAT words has been stored.
//
// With ONLINE = 1 the wrapper serves the on-line scheme instead: the core is
// always on the bus, and every write to it is held by dti_parity_check until
// the parity bits of its bytes have come over the DTI link and agree with the
// bus data (ERROR response otherwise).  test_done then means "at least one
// write checked" and test_pass "no write failed since reset".
module enc_dti_wrapper
  import dti_pkg::*;
#(
  parameter int unsigned NUM_PAT = num_patterns(DATA_W),
  parameter bit          ONLINE  = 1'b0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      test_mode,
  // bus side (slave)
  input  ahb_m2s_t  m2s,
  input  logic      hsel,
  input  logic      hready,
  output ahb_s2m_t  s2m,
  // core side
  output logic      core_hsel,
  input  ahb_s2m_t  core_s2m,
  // DTI link from the I/O side
  input  dti_link_t link,
  // verdict
  output logic      test_done,
  output logic      test_pass
);

  if (!ONLINE) begin : g_offline
    localparam int unsigned CW = $clog2(NUM_PAT + 1);

    logic [DATA_W-1:0] bus_buf [NUM_PAT];
    logic [DATA_W-1:0] dti_buf [NUM_PAT];
    logic [CW-1:0]     bus_cnt, dti_cnt;
    logic              mode_q;
    logic              dp_own, dp_write;
    logic              rx_valid;
    logic [DATA_W-1:0] rx_word;
    logic              all_equal;

    dti_serial_rx #(.W(DATA_W)) u_rx (
      .clk, .rst_n, .link, .word_valid(rx_valid), .word(rx_word)
    );

    assign core_hsel = hsel && !test_mode;

    always_comb begin
      all_equal = 1'b1;
      for (int i = 0; i < NUM_PAT; i++) begin
        if (bus_buf[i] != dti_buf[i]) all_equal = 1'b0;
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        mode_q    <= 1'b0;
        dp_own    <= 1'b0;
        dp_write  <= 1'b0;
        bus_cnt   <= '0;
        dti_cnt   <= '0;
        test_done <= 1'b0;
        test_pass <= 1'b0;
        for (int i = 0; i < NUM_PAT; i++) begin
          bus_buf[i] <= '0;
          dti_buf[i] <= '0;
        end
      end else begin
        mode_q <= test_mode;
        // address phase
        if (hready) begin
          dp_own   <= test_mode && hsel && m2s.htrans[1];
          dp_write <= test_mode && hsel && m2s.htrans[1] && m2s.hwrite;
        end
        if (test_mode && !mode_q) begin
          bus_cnt   <= '0;
          dti_cnt   <= '0;
          test_done <= 1'b0;
          test_pass <= 1'b0;
        end else begin
          // data phase of a test write: store the bus copy
          if (dp_write && hready && 32'(bus_cnt) < NUM_PAT) begin
            bus_buf[bus_cnt] <= m2s.hwdata;
            bus_cnt          <= bus_cnt + 1'b1;
          end
          // serial copy
          if (test_mode && rx_valid && 32'(dti_cnt) < NUM_PAT) begin
            dti_buf[dti_cnt] <= rx_word;
            dti_cnt          <= dti_cnt + 1'b1;
          end
          if (test_mode && !test_done && 32'(bus_cnt) == NUM_PAT && 32'(dti_cnt) == NUM_PAT) begin
            test_done <= 1'b1;
            test_pass <= all_equal;
          end
        end
      end
    end

    always_comb begin
      if (dp_own) begin
        s2m        = AHB_S2M_IDLE;
        s2m.hrdata = {{(DATA_W-2){1'b0}}, test_pass, test_done};
      end else begin
        s2m = core_s2m;
      end
    end

  end else begin : g_online
    logic             par_valid, chk, err;
    logic [PAR_W-1:0] par;

    dti_serial_rx #(.W(PAR_W)) u_rx (
      .clk, .rst_n, .link, .word_valid(par_valid), .word(par)
    );

    dti_parity_check u_chk (
      .clk, .rst_n, .m2s, .hsel, .hready, .s2m, .inner_s2m(core_s2m),
      .par_valid, .par, .chk, .err
    );

    assign core_hsel = hsel;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        test_done <= 1'b0;
        test_pass <= 1'b1;
      end else begin
        if (chk) test_done <= 1'b1;
        if (err) test_pass <= 1'b0;
      end
    end
  end

endmodule
