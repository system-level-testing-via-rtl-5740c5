// tb_dti_serial_rx: sends random 32-bit words over the serial link (MSB
// first, valid high for 32 cycles), back to back and with gaps, and checks
// each received word and that word_valid comes exactly one cycle after the
// last bit.  A frame cut short must produce no word.
module tb_dti_serial_rx;
  import dti_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  dti_link_t   link;
  logic        word_valid;
  logic [31:0] word;

  dti_serial_rx #(.W(32)) dut (.clk, .rst_n, .link, .word_valid, .word);

  int checks = 0, failures = 0;
  int n_words = 0;
  logic [31:0] expq [$];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference: count the bits on the link independently of the receiver
  logic [31:0] ref_sh = 0;
  int          ref_nb = 0;
  logic        exp_valid = 0;
  logic [31:0] exp_word = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      check(word_valid == exp_valid, $sformatf("word_valid=%0d, expected %0d", word_valid, exp_valid));
      if (exp_valid) begin
        check(word == exp_word, $sformatf("word %h, expected %h", word, exp_word));
        check(expq.size() > 0 && expq[0] == exp_word, "word is the one sent");
        if (expq.size() > 0) void'(expq.pop_front());
      end
      if (word_valid) n_words++;
      exp_valid = 0;
      if (link.valid) begin
        ref_sh = {ref_sh[30:0], link.data};
        ref_nb++;
        if (ref_nb == 32) begin exp_valid = 1; exp_word = ref_sh; ref_nb = 0; end
      end else ref_nb = 0;
    end
  end

  task automatic send(input logic [31:0] w, input int nbits);
    for (int i = 31; i > 31 - nbits; i--) begin
      @(negedge clk);
      link.valid = 1; link.data = w[i];
    end
    if (nbits == 32) expq.push_back(w);
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    link = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 20; k++) begin
      send($urandom, 32);
      if (k % 3 == 0) begin
        @(negedge clk) link = '0;
        repeat (k % 5) @(negedge clk);
      end
    end
    @(negedge clk) link = '0;
    send(32'hDEAD_BEEF, 17);      // cut short
    @(negedge clk) link = '0;
    @(negedge clk);
    send(32'h8000_0001, 32);
    @(negedge clk) link = '0;
    repeat (4) @(negedge clk);
    check(n_words == 21, $sformatf("%0d words received, expected 21", n_words));
    check(expq.size() == 0, "all words received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
