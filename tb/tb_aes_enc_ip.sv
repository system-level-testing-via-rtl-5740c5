// tb_aes_enc_ip: the encryption core through its AHB register interface.
// Encrypts three published AES-128 vectors (FIPS-197 appendix C.1, appendix
// B, and the all-zero key and block), checks the ciphertext, the register
// read-back, the done/busy flags and that the result is ready 11 cycles
// after the start write's data phase (10 rounds plus the status register).
module tb_aes_enc_ip;
  import dti_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ahb_m2s_t m2s;
  logic     hsel;
  ahb_s2m_t s2m;

  aes_enc_ip dut (.clk, .rst_n, .m2s, .hsel, .hready(s2m.hreadyout), .s2m);

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus(input logic wr, input logic [7:0] off, input logic [31:0] d, output logic [31:0] rd);
    @(negedge clk);
    m2s = '0; m2s.htrans = HTRANS_NONSEQ; m2s.hwrite = wr; m2s.haddr = ENC_BASE | 32'(off); hsel = 1;
    @(negedge clk);
    m2s.htrans = HTRANS_IDLE; hsel = 0; m2s.hwdata = d;
    #1 rd = s2m.hrdata;
  endtask

  task automatic encrypt(input logic [127:0] key, input logic [127:0] pt, input logic [127:0] ct);
    logic [31:0] rd;
    logic [127:0] got;
    int lat;
    for (int i = 0; i < 4; i++) bus(1, AES_KEY0 + 8'(4 * i), key[127-32*i -: 32], rd);
    for (int i = 0; i < 4; i++) bus(1, AES_DIN0 + 8'(4 * i), pt[127-32*i -: 32], rd);
    for (int i = 0; i < 4; i++) begin
      bus(0, AES_KEY0 + 8'(4 * i), 0, rd);
      check(rd == key[127-32*i -: 32], "key read-back");
    end
    bus(1, AES_CTRL, 32'h1, rd);       // start: core loads at the end of this data phase
    // status reads back to back, two cycles each; the k-th read's data phase
    // is 2k cycles after the start data phase.  Ten rounds, then done_q one
    // cycle later: the first read to see done is the 6th (cycle 12).
    lat = 0;
    do begin
      bus(0, AES_CTRL, 0, rd);
      lat++;
      if (!rd[0]) check(rd[1], "busy while not done");
    end while (!rd[0] && lat < 20);
    check(lat == 6, $sformatf("done seen on status read %0d, expected 6", lat));
    bus(0, AES_CTRL, 0, rd);
    check(rd[1:0] == 2'b01, "status done, not busy");
    for (int i = 0; i < 4; i++) begin
      bus(0, AES_DOUT0 + 8'(4 * i), 0, rd);
      got[127-32*i -: 32] = rd;
    end
    check(got == ct, $sformatf("ciphertext %h, expected %h", got, ct));
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    m2s = '0; hsel = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    bus(0, AES_CTRL, 0, rd);
    check(rd[1:0] == 2'b00, "idle after reset");
    encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
            128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
            128'h3925841d02dc09fbdc118597196a0b32);
    encrypt(128'h0, 128'h0, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e);
    bus(0, 8'h50, 0, rd);
    check(rd == 0, "unused offset reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
