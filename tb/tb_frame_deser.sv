// tb_frame_deser: sends random 960-bit frames serially into frame_deser with a
// strobe every 4 clocks, and checks the 120 bytes, the 32 channel words with
// their channel numbers, the frame_done pulse (once, after the last bit) and
// frame_err for a frame cut short and for a transfer that runs too long.
module tb_frame_deser;
  import feb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic bit_stb = 0, trans_onb = 1, dout = 0;
  logic byte_valid, word_valid, frame_done, frame_err;
  logic [7:0] byte_data;
  logic [WORD_BITS-1:0] word_data;
  logic [CHAN_W-1:0] word_chan;
  frame_deser dut (.*);
  always #5 clk = ~clk;

  logic [959:0] frame;
  int nbytes, nwords, ndone, nerr;

  // collector
  always @(posedge clk) if (rst_n) begin
    if (byte_valid) begin
      checks++;
      if (byte_data !== frame[959 - 8*nbytes -: 8]) begin
        failures++; $display("FAIL byte %0d got %h", nbytes, byte_data);
      end
      nbytes++;
    end
    if (word_valid) begin
      checks++;
      if (word_data !== frame[959 - 30*nwords -: 30] || word_chan != 5'(nwords)) begin
        failures++; $display("FAIL word %0d chan %0d", nwords, word_chan);
      end
      nwords++;
    end
    if (frame_done) ndone++;
    if (frame_err)  nerr++;
  end

  task automatic send(input int nbits);
    for (int i = 0; i < nbits; i++) begin
      @(negedge clk); trans_onb = 0; dout = frame[959 - (i % 960)];
      repeat (2) @(negedge clk);
      bit_stb = 1; @(negedge clk); bit_stb = 0;
    end
    @(negedge clk); trans_onb = 1;
    repeat (3) @(negedge clk);
    bit_stb = 1; @(negedge clk); bit_stb = 0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int i = 0; i < 30; i++) frame[32*i +: 32] = $urandom;
      nbytes = 0; nwords = 0; ndone = 0; nerr = 0;
      send(960);
      checks++;
      if (nbytes != 120 || nwords != 32 || ndone != 1 || nerr != 0) begin
        failures++; $display("FAIL frame %0d: bytes=%0d words=%0d done=%0d err=%0d", f, nbytes, nwords, ndone, nerr);
      end
    end
    // short frame
    nbytes = 0; nwords = 0; ndone = 0; nerr = 0;
    send(500);
    checks++; if (ndone != 0 || nerr != 1) begin failures++; $display("FAIL short: done=%0d err=%0d", ndone, nerr); end
    // long transfer: 960 good bits then extra bits
    nbytes = 0; nwords = 0; ndone = 0; nerr = 0;
    send(965);
    checks++; if (ndone != 1 || nerr != 1 || nbytes != 120) begin failures++; $display("FAIL long: done=%0d err=%0d", ndone, nerr); end
    // a good frame still works afterwards
    nbytes = 0; nwords = 0; ndone = 0; nerr = 0;
    send(960);
    checks++; if (ndone != 1 || nerr != 0 || nwords != 32) begin failures++; $display("FAIL recover"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
