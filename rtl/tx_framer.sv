// tx_framer: sends the buffered readout frames of the chips over the UART.
//
// When a chip's frame has been completely received (frame_done) the chip is
// marked pending. The framer serves pending chips lowest index first and sends,
// for each, a header byte HEADER, one byte holding the chip index, then the
// FRAME_BYTES raw (still Gray-coded) frame bytes popped from that chip's FIFO in
// arrival order. The packet layout is this design's choice; the frame itself
// is exactly what the ASIC sent.
//
// Interface: valid/ready to uart_tx (tx_valid stays high with stable tx_data
// until accepted); fifo_pop pops the selected chip's FIFO on the clock its byte
// is accepted. busy is high while any chip is pending or being sent.
module tx_framer #(
  parameter int unsigned N_CHIPS     = 2,
  parameter int unsigned FRAME_BYTES = 120,
  parameter logic [7:0]  HEADER      = 8'hA5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_CHIPS-1:0] frame_done,
  input  logic [7:0]         fifo_dout [N_CHIPS],
  input  logic [N_CHIPS-1:0] fifo_empty,
  output logic [N_CHIPS-1:0] fifo_pop,
  output logic               tx_valid,
  output logic [7:0]         tx_data,
  input  logic               tx_ready,
  output logic               busy,
  output logic               pkt_evt      // pulse: a packet has been sent
);
  localparam int unsigned SEL_W = (N_CHIPS > 1) ? $clog2(N_CHIPS) : 1;
  localparam int unsigned BC_W  = $clog2(FRAME_BYTES + 1);

  typedef enum logic [1:0] {T_IDLE, T_HDR, T_ID, T_DATA} tstate_t;
  tstate_t state;

  logic [N_CHIPS-1:0] pending;
  logic [SEL_W-1:0]   sel;
  logic [BC_W-1:0]    byte_cnt;
  logic               accept;

  assign accept = tx_valid && tx_ready;

  // lowest pending chip
  logic [SEL_W-1:0] next_sel;
  always_comb begin
    next_sel = '0;
    for (int i = int'(N_CHIPS) - 1; i >= 0; i--)
      if (pending[i]) next_sel = SEL_W'(i);
  end

  always_comb begin
    tx_valid = 1'b0;
    tx_data  = HEADER;
    fifo_pop = '0;
    unique case (state)
      T_HDR:  begin tx_valid = 1'b1; tx_data = HEADER; end
      T_ID:   begin tx_valid = 1'b1; tx_data = 8'(sel); end
      T_DATA: begin
        tx_valid = !fifo_empty[sel];
        tx_data  = fifo_dout[sel];
        fifo_pop[sel] = accept;
      end
      default: ;
    endcase
  end

  // pending bit of the chip whose packet ends in this clock
  logic [N_CHIPS-1:0] clr;
  always_comb begin
    clr = '0;
    if (state == T_DATA && accept && byte_cnt == BC_W'(1)) clr[sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= T_IDLE;
      pending  <= '0;
      sel      <= '0;
      byte_cnt <= '0;
      pkt_evt  <= 1'b0;
    end else begin
      pkt_evt <= 1'b0;
      unique case (state)
        T_IDLE: if (|pending) begin
          sel   <= next_sel;
          state <= T_HDR;
        end
        T_HDR:  if (accept) state <= T_ID;
        T_ID:   if (accept) begin
          state    <= T_DATA;
          byte_cnt <= BC_W'(FRAME_BYTES);
        end
        T_DATA: if (accept) begin
          byte_cnt <= byte_cnt - 1'b1;
          if (byte_cnt == BC_W'(1)) begin
            state    <= T_IDLE;
            pkt_evt  <= 1'b1;
          end
        end
        default: state <= T_IDLE;
      endcase
      pending <= (pending & ~clr) | frame_done;
    end
  end

  assign busy = (state != T_IDLE) || (|pending);

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           tx_valid && !tx_ready |=> tx_valid && $stable(tx_data));
endmodule
