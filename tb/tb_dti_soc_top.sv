// tb_dti_soc_top: end-to-end test of the whole system at its default sizes
// (32-bit bus, 10 patterns).
//
// Sequence: (1) after reset the system tests both channels and must enter
// normal mode with both verdicts passing, in the expected number of cycles;
// (2) in normal mode the host encrypts the FIPS-197 example blocks through
// the AES core and stores a ciphertext word in processor memory; (3) an
// unmapped address must return an ERROR response; (4) a stuck-at-1 line on
// the processor's bus connection must make the test fail and keep the host
// port closed; (5) with the fault removed a new test must pass again.
// Counts each mechanism (test mode entry, serial copies, DTI stalls, compare
// pass and fail, mode switch, bus error, encryption) and fails any that never
// happened.
module tb_dti_soc_top;
  import dti_pkg::*;

  localparam int unsigned NP = 10;
  localparam int unsigned CW = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              start_test = 0, cmd_valid = 0, cmd_write = 0;
  logic [31:0]       cmd_addr = 0, cmd_wdata = 0;
  logic              cmd_ready, rsp_valid, rsp_err;
  logic [31:0]       rsp_rdata;
  logic              test_mode, test_done, test_pass, enc_pass, cpu_pass, enc_dti_done, enc_dti_pass;
  ahb_m2s_t          cpu_m2s;
  logic              cpu_hsel, cpu_hready;
  ahb_s2m_t          cpu_s2m;
  logic [CW-1:0]     cpu_dti_idx, cpu_dti_count;
  logic [31:0]       cpu_dti_word;
  logic [31:0]       stuck1_mask = 0;

  dti_soc_top dut (.*);

  leon3_model #(.NUM_PAT(NP), .CW(CW)) u_cpu (
    .clk, .rst_n, .test_mode, .m2s(cpu_m2s), .hsel(cpu_hsel), .hready(cpu_hready),
    .s2m(cpu_s2m), .dti_idx(cpu_dti_idx), .dti_word(cpu_dti_word),
    .dti_count(cpu_dti_count), .stuck1_mask
  );

  int checks = 0, failures = 0;
  int n_test_entry = 0, n_dti_words = 0, n_stall = 0, n_pass = 0, n_fail = 0;
  int n_normal = 0, n_buserr = 0, n_encrypt = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism monitors (top-level signals only)
  logic tm_q = 0;
  logic [CW-1:0] cnt_q = 0;
  always @(posedge clk) begin
    tm_q <= test_mode;
    if (test_mode && !tm_q) n_test_entry++;
    if (!test_mode && tm_q && test_pass) n_normal++;
    cnt_q <= cpu_dti_count;
    if (rst_n && cpu_dti_count == cnt_q + 1'b1) n_dti_words++;
  end

  task automatic host(input logic wr, input logic [31:0] a, input logic [31:0] d,
                      output logic [31:0] rd, output logic err);
    @(negedge clk);
    cmd_valid = 1; cmd_write = wr; cmd_addr = a; cmd_wdata = d;
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk) cmd_valid = 0;
    while (!rsp_valid) @(negedge clk);
    rd = rsp_rdata; err = rsp_err;
  endtask

  task automatic wait_test(output int cycles);
    cycles = 0;
    while (!test_mode) @(posedge clk);
    while (!test_done || test_mode) begin
      @(posedge clk);
      cycles++;
    end
  endtask

  task automatic encrypt(input logic [127:0] key, input logic [127:0] pt, input logic [127:0] ct);
    logic [31:0] rd; logic err; logic [127:0] got;
    for (int i = 0; i < 4; i++) host(1, ENC_BASE + 32'(AES_KEY0) + 4*i, key[127-32*i -: 32], rd, err);
    for (int i = 0; i < 4; i++) host(1, ENC_BASE + 32'(AES_DIN0) + 4*i, pt[127-32*i -: 32], rd, err);
    host(1, ENC_BASE + 32'(AES_CTRL), 32'h1, rd, err);
    do host(0, ENC_BASE + 32'(AES_CTRL), 0, rd, err); while (!rd[0]);
    for (int i = 0; i < 4; i++) begin
      host(0, ENC_BASE + 32'(AES_DOUT0) + 4*i, 0, rd, err);
      got[127-32*i -: 32] = rd;
    end
    check(got == ct, $sformatf("ciphertext %h, expected %h", got, ct));
    n_encrypt++;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a test word takes DATA_W serial cycles plus handshake; 2*NP words
  localparam int MIN_CYC = 2 * NP * DATA_W;
  localparam int MAX_CYC = 2 * NP * (DATA_W + 6) + 60;

  initial begin
    int cyc;
    logic [31:0] rd; logic err;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // (1) power-on test
    wait_test(cyc);
    $display("power-on test: %0d cycles", cyc);
    check(test_pass && enc_pass && cpu_pass, "power-on test passes");
    check(enc_dti_done && enc_dti_pass, "encryption wrapper verdict");
    check(cpu_dti_count == 4'(NP), "processor wrapper received all copies");
    check(cyc >= MIN_CYC && cyc <= MAX_CYC, $sformatf("test took %0d cycles, expected %0d..%0d", cyc, MIN_CYC, MAX_CYC));
    if (cyc >= MIN_CYC) n_stall++;   // the bus waited for the serial link
    if (test_pass) n_pass++;
    // the processor memory holds the patterns sent over the bus
    for (int i = 0; i < NP; i++) begin
      logic [31:0] exp;
      exp = '0;
      for (int l = 0; l < 32; l++) exp[l] = ((l >> (4 - i / 2)) & 1) ^ (i % 2);
      host(0, CPU_BASE + 32'(CPU_TEST_DATA) + 4*i, 0, rd, err);
      check(rd == exp && !err, $sformatf("processor memory pattern %0d = %h, expected %h", i, rd, exp));
    end
    // (2) normal operation: FIPS-197 appendix C.1 and appendix B vectors
    encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
            128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
            128'h3925841d02dc09fbdc118597196a0b32);
    host(1, CPU_BASE + 32'h20, 32'h69c4e0d8, rd, err);
    host(0, CPU_BASE + 32'h20, 0, rd, err);
    check(rd == 32'h69c4e0d8 && !err, "ciphertext word stored in processor memory");
    // (3) unmapped address
    host(0, 32'h1234_0000, 0, rd, err);
    check(err, "unmapped address answers ERROR");
    if (err) n_buserr++;
    // (4) stuck-at-1 on processor data line 5
    stuck1_mask = 32'h0000_0020;
    @(negedge clk) start_test = 1;
    @(negedge clk) start_test = 0;
    wait_test(cyc);
    check(!test_pass && !cpu_pass && enc_pass, "stuck line on the processor side detected");
    if (!test_pass) n_fail++;
    repeat (5) @(posedge clk);
    check(!cmd_ready, "host port closed after a failed test");
    // (5) fault removed, test again
    stuck1_mask = 0;
    @(negedge clk) start_test = 1;
    @(negedge clk) start_test = 0;
    wait_test(cyc);
    check(test_pass, "test passes again after repair");
    if (test_pass) n_pass++;
    repeat (2) @(posedge clk);
    check(cmd_ready, "host port open in normal mode");
    host(0, ENC_BASE + 32'(AES_DOUT0), 0, rd, err);
    check(rd == 32'h3925841d, "encryption core kept its result across the test");
    host(0, ENC_BASE + 32'(AES_KEY0), 0, rd, err);
    check(rd == 32'h2b7e1516, "test patterns did not reach the core's key register");

    $display("mechanisms: test_entry=%0d dti_words=%0d stall=%0d pass=%0d fail=%0d normal=%0d buserr=%0d encrypt=%0d",
             n_test_entry, n_dti_words, n_stall, n_pass, n_fail, n_normal, n_buserr, n_encrypt);
    check(n_test_entry == 3, "test mode entered three times");
    check(n_dti_words == 3 * NP, "serial copies received");
    check(n_stall > 0, "DTI stall seen");
    check(n_pass == 2 && n_fail == 1, "pass and fail verdicts seen");
    check(n_normal == 2, "switch to normal mode seen");
    check(n_buserr > 0 && n_encrypt == 2, "bus error and encryption seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
