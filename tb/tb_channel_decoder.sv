// tb_channel_decoder: drives random Gray-coded channel words into
// channel_decoder and compares every field and the absolute time with values
// computed here from the binary values the words were built from. Also checks
// the one-clock latency and a few hand-worked corner values.
module tb_channel_decoder;
  import feb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [WORD_BITS-1:0] in_word = '0;
  logic [CHAN_W-1:0] in_chan = '0;
  logic out_valid;
  hit_rec_t out_rec;

  channel_decoder #(.CHIP(1'b1)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [9:0] g(input logic [9:0] b); return b ^ (b >> 1); endfunction

  task automatic one(input int c, input int f, input int q, input bit h, input int ch);
    int exp_t;
    @(negedge clk);
    in_valid = 1;
    in_word  = {g(10'(c))[8:0], g(10'(f)), g(10'(q)), h};
    in_chan  = 5'(ch);
    @(posedge clk); #1;
    in_valid = 0;
    exp_t = (c + 1) * 25000 - f * 37;
    checks++;
    if (!out_valid || out_rec.coarse != 9'(c) || out_rec.fine != 10'(f) || out_rec.charge != 10'(q)
        || out_rec.hit != h || out_rec.chan != 5'(ch) || out_rec.chip != 1'b1
        || int'(out_rec.abs_time_ps) != exp_t) begin
      failures++;
      $display("FAIL c=%0d f=%0d q=%0d h=%0d: got c=%0d f=%0d q=%0d h=%0d t=%0d exp t=%0d v=%0d",
               c, f, q, h, out_rec.coarse, out_rec.fine, out_rec.charge, out_rec.hit,
               out_rec.abs_time_ps, exp_t, out_valid);
    end
    @(posedge clk); #1;
    checks++; if (out_valid) begin failures++; $display("FAIL valid held"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    one(0, 0, 0, 0, 0);
    one(511, 0, 1023, 1, 31);      // end of the coarse loop: 12.8 us
    one(0, 1023, 5, 1, 3);         // negative corner
    one(415, 200, 77, 1, 4);
    for (int i = 0; i < 500; i++)
      one($urandom_range(511), $urandom_range(1023), $urandom_range(1023), 1'($urandom), $urandom_range(31));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
