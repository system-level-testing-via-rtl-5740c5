// tb_dti_soc_online: the whole system built for the on-line scheme
// (ONLINE = 1).  There is no test mode: the host port must open right after
// reset.  The host encrypts the FIPS-197 example block and writes and reads
// processor memory.  Every write must be held until its parity copy has come
// over the DTI link (write latency longer than read latency by the PAR_W
// serial bits) and must complete without error; the encryption-side verdict
// must report checks and no failure, and the processor-side wrapper must
// count one check per write.
module tb_dti_soc_online;
  import dti_pkg::*;

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
  logic [CW-1:0]     cpu_dti_idx = 0, cpu_dti_count;
  logic [31:0]       cpu_dti_word;

  dti_soc_top #(.ONLINE(1'b1)) dut (.*);

  leon3_model #(.NUM_PAT(10), .CW(CW)) u_cpu (
    .clk, .rst_n, .test_mode, .m2s(cpu_m2s), .hsel(cpu_hsel), .hready(cpu_hready),
    .s2m(cpu_s2m), .dti_idx(), .dti_word(cpu_dti_word),
    .dti_count(cpu_dti_count), .stuck1_mask(32'h0)
  );

  int checks = 0, failures = 0;
  int n_tm = 0, n_wr = 0, n_err = 0;
  int wr_lat_min = 1000, rd_lat_max = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n && test_mode) n_tm++;

  task automatic host(input logic wr, input logic [31:0] a, input logic [31:0] d,
                      output logic [31:0] rd, output logic err);
    int lat;
    @(negedge clk);
    cmd_valid = 1; cmd_write = wr; cmd_addr = a; cmd_wdata = d;
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk) cmd_valid = 0;
    lat = 0;
    while (!rsp_valid) begin @(negedge clk); lat++; end
    rd = rsp_rdata; err = rsp_err;
    if (wr && (a & REGION_MASK) != 32'h1234_0000) begin
      n_wr++;
      if (lat < wr_lat_min) wr_lat_min = lat;
      check(!err, $sformatf("write to %h certified", a));
    end
    if (!wr && lat > rd_lat_max) rd_lat_max = lat;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd; logic err; logic [127:0] got;
    logic [127:0] key, pt;
    key = 128'h000102030405060708090a0b0c0d0e0f;
    pt  = 128'h00112233445566778899aabbccddeeff;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(cmd_ready, "host port open right after reset");
    for (int i = 0; i < 4; i++) host(1, ENC_BASE + 32'(AES_KEY0) + 4*i, key[127-32*i -: 32], rd, err);
    for (int i = 0; i < 4; i++) host(1, ENC_BASE + 32'(AES_DIN0) + 4*i, pt[127-32*i -: 32], rd, err);
    host(1, ENC_BASE + 32'(AES_CTRL), 32'h1, rd, err);
    do host(0, ENC_BASE + 32'(AES_CTRL), 0, rd, err); while (!rd[0]);
    for (int i = 0; i < 4; i++) begin
      host(0, ENC_BASE + 32'(AES_DOUT0) + 4*i, 0, rd, err);
      got[127-32*i -: 32] = rd;
    end
    check(got == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, $sformatf("ciphertext %h", got));
    check(enc_dti_done && enc_dti_pass, "encryption-side checks done, none failed");
    for (int i = 0; i < 5; i++) host(1, CPU_BASE + 32'(4 * i), got[127-32*(i%4) -: 32] ^ 32'(i), rd, err);
    for (int i = 0; i < 5; i++) begin
      host(0, CPU_BASE + 32'(4 * i), 0, rd, err);
      check(rd == (got[127-32*(i%4) -: 32] ^ 32'(i)) && !err, "processor memory read-back");
    end
    check(cpu_dti_count == 4'd5, $sformatf("processor-side checks %0d, expected 5", cpu_dti_count));
    host(0, 32'h1234_0000, 0, rd, err);
    check(err, "unmapped address answers ERROR");
    if (err) n_err++;
    $display("writes=%0d write latency min=%0d read latency max=%0d test-mode cycles=%0d",
             n_wr, wr_lat_min, rd_lat_max, n_tm);
    check(n_tm == 0, "no test mode in the on-line scheme");
    check(n_wr == 14, "all writes made");
    check(wr_lat_min >= rd_lat_max + PAR_W, "writes held for their parity copy");
    check(n_err == 1, "bus error seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
