// dti_pkg: types and constants shared by the DTI test system.
//
// The system is a single-master AMBA AHB-Lite bus (I/O core as master; the
// encryption core and the microprocessor as slaves) plus a bit-serial "debug
// transport" (DTI) side channel that carries a second copy of every test
// pattern.  The bus word width (32 bits) and the test pattern count follow the
// interconnect test of Jutman: 2*ceil(log2(N)) patterns for N lines, 10 for a
// 32-bit bus.  The address map and the register offsets are this design's own
// choice.
package dti_pkg;

  localparam int unsigned DATA_W = 32;
  localparam int unsigned ADDR_W = 32;

  // AHB transfer type (AMBA 2 / AHB-Lite encoding)
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_t;

  // Master-to-slave bundle (address phase fields plus the write data of the
  // data phase, as in AHB-Lite).
  typedef struct packed {
    logic [ADDR_W-1:0] haddr;
    htrans_t           htrans;
    logic              hwrite;
    logic [2:0]        hsize;
    logic [DATA_W-1:0] hwdata;
  } ahb_m2s_t;

  // Slave-to-master bundle.
  typedef struct packed {
    logic [DATA_W-1:0] hrdata;
    logic              hreadyout;
    logic              hresp;     // 0 = OKAY, 1 = ERROR
  } ahb_s2m_t;

  localparam ahb_s2m_t AHB_S2M_IDLE = '{hrdata: '0, hreadyout: 1'b1, hresp: 1'b0};

  // Bit-serial DTI link: valid is high for DATA_W consecutive cycles while
  // data carries one word, most significant bit first.
  typedef struct packed {
    logic valid;
    logic data;
  } dti_link_t;

  // Address map: the upper 16 address bits select the slave.
  localparam logic [ADDR_W-1:0] ENC_BASE    = 32'h8000_0000;
  localparam logic [ADDR_W-1:0] CPU_BASE    = 32'h4000_0000;
  localparam logic [ADDR_W-1:0] REGION_MASK = 32'hFFFF_0000;

  // Offsets inside the encryption region
  localparam logic [7:0] AES_KEY0   = 8'h00;  // 0x00..0x0C key words, word 0 = key[127:96]
  localparam logic [7:0] AES_DIN0   = 8'h10;  // 0x10..0x1C plaintext words
  localparam logic [7:0] AES_CTRL   = 8'h20;  // write bit0 = start; read {busy, done}
  localparam logic [7:0] AES_DOUT0  = 8'h30;  // 0x30..0x3C ciphertext words
  // In test mode every write to the encryption region is a test pattern and
  // every read returns the DTI wrapper's verdict.
  localparam logic [7:0] ENC_TEST_STATUS = 8'h40;

  // Offsets used in the microprocessor region during the test
  localparam logic [15:0] CPU_TEST_DATA   = 16'h1000; // patterns are written here
  localparam logic [15:0] CPU_TEST_RESULT = 16'h1100; // processor posts {pass, done} here

  // Interconnect test patterns (the counting-sequence bus test of A. Jutman,
  // ETS 2004): line L of an N-line bus is labelled with the binary number L
  // on ceil(log2 N) bits.  Pattern 2k reads label bit (B-1-k) of every line
  // (most significant label bit first); pattern 2k+1 is its complement.
  function automatic int unsigned num_patterns(int unsigned n_lines);
    return 2 * $clog2(n_lines);
  endfunction

  function automatic logic [DATA_W-1:0] tp_pattern(int unsigned n_lines, int unsigned idx);
    logic [DATA_W-1:0] p;
    int unsigned       nb;
    int unsigned       bitpos;
    nb     = $clog2(n_lines);
    bitpos = nb - 1 - (idx / 2);
    p      = '0;
    for (int unsigned l = 0; l < n_lines; l++) begin
      p[l] = l[bitpos] ^ idx[0];
    end
    return p;
  endfunction

  // On-line scheme: one even-parity bit per byte of a bus word (the bit that
  // makes the number of ones in the byte plus the bit even).  Bit k covers
  // byte k, bits [8k+7:8k].
  localparam int unsigned PAR_W = DATA_W / 8;

  function automatic logic [PAR_W-1:0] byte_parity(input logic [DATA_W-1:0] w);
    logic [PAR_W-1:0] p;
    for (int k = 0; k < PAR_W; k++) p[k] = ^w[8*k +: 8];
    return p;
  endfunction

endpackage
