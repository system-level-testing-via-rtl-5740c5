// dti_soc_top: the encryption / decryption system with its DTI test path.
//
// A single AHB-Lite bus joins the I/O core (master) to two slaves: the AES
// encryption core and the microprocessor that runs the decryption software.
// Next to the bus runs the register-transfer form of the TLM debug transport:
// a DTI wrapper on the I/O side serialises every test-mode write onto a
// one-bit link towards the addressed target, and a DTI wrapper in front of
// each target receives that copy.  The encryption-side wrapper compares the
// bus copy with the serial copy itself; the processor-side wrapper only
// buffers the serial copy and the processor compares it with what it received
// over the bus, posting its verdict in its memory, where the I/O core reads
// it.  The I/O core enters normal mode only when both channels pass.
//
// The processor and its memory are not part of this RTL: the processor's bus
// slave port (cpu_*) and the DTI buffer read port (cpu_dti_*) are brought out
// so that a processor model or the real core can be attached.
//
// ONLINE selects the test scheme.  0 (the default, the scheme built out in
// full above) is the off-line test.  1 is the on-line scheme: no test mode;
// every write carries the even parity of its bytes over the DTI link, and
// the target wrapper holds the write until the parity has arrived and agrees,
// answering ERROR otherwise.  In that scheme the verdict outputs report the
// encryption-side checks and cpu_dti_count counts checked processor writes.
//
// Interface: host command port of the I/O core (cmd_*/rsp_*), start_test, the
// verdicts, and the processor attachment.  All logic runs on clk with an
// active-low asynchronous reset; after reset the system tests the bus first.
module dti_soc_top
  import dti_pkg::*;
#(
  parameter int unsigned NUM_PAT = num_patterns(DATA_W),
  parameter int unsigned CW      = $clog2(NUM_PAT + 1),
  parameter bit          ONLINE  = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  // host port of the I/O core
  input  logic              start_test,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic              cmd_write,
  input  logic [ADDR_W-1:0] cmd_addr,
  input  logic [DATA_W-1:0] cmd_wdata,
  output logic              rsp_valid,
  output logic [DATA_W-1:0] rsp_rdata,
  output logic              rsp_err,
  // test status
  output logic              test_mode,
  output logic              test_done,
  output logic              test_pass,
  output logic              enc_pass,
  output logic              cpu_pass,
  output logic              enc_dti_done,   // encryption-side wrapper verdict
  output logic              enc_dti_pass,
  // microprocessor attachment: AHB slave port
  output ahb_m2s_t          cpu_m2s,
  output logic              cpu_hsel,
  output logic              cpu_hready,
  input  ahb_s2m_t          cpu_s2m,
  // microprocessor attachment: DTI buffer read port
  input  logic [CW-1:0]     cpu_dti_idx,
  output logic [DATA_W-1:0] cpu_dti_word,
  output logic [CW-1:0]     cpu_dti_count
);

  ahb_m2s_t  m2s;
  ahb_s2m_t  m_s2m;
  logic [1:0] hsel;
  logic      hready;
  ahb_s2m_t  s_s2m [2];
  dti_link_t link [2];
  logic      dti_ready;

  logic      enc_core_hsel;
  ahb_s2m_t  enc_core_s2m;

  io_core #(.NUM_PAT(NUM_PAT), .ONLINE(ONLINE)) u_io (
    .clk, .rst_n,
    .m2s, .s2m(m_s2m),
    .dti_ready, .test_mode,
    .start_test, .test_done, .test_pass, .enc_pass, .cpu_pass,
    .cmd_valid, .cmd_ready, .cmd_write, .cmd_addr, .cmd_wdata,
    .rsp_valid, .rsp_rdata, .rsp_err
  );

  io_dti_wrapper #(.W(DATA_W), .ONLINE(ONLINE)) u_io_dti (
    .clk, .rst_n, .test_mode, .m2s, .hready, .dti_ready, .link
  );

  ahb_bus #(.NUM_SLAVES(2), .BASE({CPU_BASE, ENC_BASE})) u_bus (
    .clk, .rst_n, .m2s, .m_s2m, .hsel, .hready, .s_s2m
  );

  // slave 0: encryption core behind its DTI wrapper
  enc_dti_wrapper #(.NUM_PAT(NUM_PAT), .ONLINE(ONLINE)) u_enc_dti (
    .clk, .rst_n, .test_mode,
    .m2s, .hsel(hsel[0]), .hready, .s2m(s_s2m[0]),
    .core_hsel(enc_core_hsel), .core_s2m(enc_core_s2m),
    .link(link[0]),
    .test_done(enc_dti_done), .test_pass(enc_dti_pass)
  );

  aes_enc_ip u_aes (
    .clk, .rst_n, .m2s, .hsel(enc_core_hsel), .hready, .s2m(enc_core_s2m)
  );

  // slave 1: microprocessor behind its DTI wrapper
  cpu_dti_wrapper #(.NUM_PAT(NUM_PAT), .CW(CW), .ONLINE(ONLINE)) u_cpu_dti (
    .clk, .rst_n, .test_mode,
    .m2s, .hsel(hsel[1]), .hready, .s2m(s_s2m[1]),
    .cpu_hsel, .cpu_s2m,
    .rd_idx(cpu_dti_idx), .rd_word(cpu_dti_word), .rx_count(cpu_dti_count),
    .link(link[1])
  );

  assign cpu_m2s    = m2s;
  assign cpu_hready = hready;

endmodule
