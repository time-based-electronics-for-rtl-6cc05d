// uart_tx: 8N1 asynchronous serial transmitter.
//
// Sends each accepted byte as one start bit (0), eight data bits LSB first and
// one stop bit (1), each CLKS_PER_BIT clocks long (868 = 115200 baud at
// 100 MHz; the baud rate is this design's choice). Handshake: a byte is taken
// on a clock where valid and ready are both high; ready is high only while the
// line is idle, so one byte takes 10*CLKS_PER_BIT clocks from acceptance to
// the end of its stop bit. txd idles high.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT);

  logic [CW-1:0] baud_cnt;
  logic [3:0]    bit_idx;     // 0 = start, 1..8 = data, 9 = stop
  logic [8:0]    sh;          // {stop, data}
  logic          running;

  assign ready = !running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      baud_cnt <= '0;
      bit_idx  <= '0;
      sh       <= '1;
      running  <= 1'b0;
      txd      <= 1'b1;
    end else if (!running) begin
      txd <= 1'b1;
      if (valid) begin
        running  <= 1'b1;
        sh       <= {1'b1, data};
        txd      <= 1'b0;               // start bit
        bit_idx  <= '0;
        baud_cnt <= '0;
      end
    end else if (32'(baud_cnt) == CLKS_PER_BIT - 1) begin
      baud_cnt <= '0;
      if (bit_idx == 4'd9) begin
        running <= 1'b0;
        txd     <= 1'b1;
      end else begin
        txd     <= sh[0];
        sh      <= {1'b1, sh[8:1]};
        bit_idx <= bit_idx + 4'd1;
      end
    end else begin
      baud_cnt <= baud_cnt + 1'b1;
    end
  end
endmodule
