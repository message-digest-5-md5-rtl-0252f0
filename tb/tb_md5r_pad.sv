// tb_md5r_pad: checks the padding unit against a byte-wise MD5 padding of
// random strings of 1-8 characters, one string per clock, with a one-clock
// latency, and checks that reset clears valid.
module tb_md5r_pad;
  import md5_pkg::*;
  import md5r_pkg::*;
  import md5_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1, valid_in = 1'b0;
  word64_t wordin = '0;
  wordlen_t wordlen = '0;
  logic valid_out;
  block_t m;
  word64_t word_out;
  wordlen_t wordlen_out;
  int checks = 0, failures = 0;

  md5r_pad dut (.*);

  always #5 clk = ~clk;

  function automatic block_t ref_block(string s);
    byte unsigned b [64];
    block_t r;
    foreach (b[i]) b[i] = 8'h00;
    for (int i = 0; i < s.len(); i++) b[i] = s[i];
    b[s.len()] = 8'h80;
    b[56] = 8'(s.len() * 8);
    for (int j = 0; j < 16; j++) r[j] = {b[4*j+3], b[4*j+2], b[4*j+1], b[4*j]};
    return r;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  string sent [$];
  initial begin
    repeat (2) @(posedge clk);
    check(valid_out == 1'b0, "valid low in reset");
    rst <= 1'b0;
    for (int n = 0; n < 300; n++) begin
      automatic string abc = "abcdefgh";
      automatic string s = (n < 8) ? abc.substr(0, n) : rand_string(8);
      @(negedge clk);
      valid_in = (n % 7 != 3);
      wordin   = pack(s);
      wordlen  = wordlen_t'(s.len() - 1);
      sent.push_back(valid_in ? s : "");
      @(posedge clk); #1;
      check(valid_out == valid_in, "valid one clock later");
      if (valid_in) begin
        check(m == ref_block(s), $sformatf("block of \"%s\"", s));
        check(word_out == pack(s) && wordlen_out == wordlen, "string passed along");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
