// styx_uart: serial line interface that carries Styx messages.
//
// 8 data bits, no parity, one stop bit, least significant bit first, idle
// high. CLKS_PER_BIT clock cycles per bit: 217 gives 115200 baud at the
// 25 MHz core clock (the rate is this design's choice). The receiver
// synchronises rx through two flip-flops, waits half a bit after a falling
// edge, checks that the start bit is still low, then samples each bit in
// its middle; a received byte is held in rx_data with rx_valid high until
// rx_ack. A byte arriving while the previous one is unacknowledged sets
// rx_overrun and is dropped. The transmitter accepts a byte on tx_valid when
// tx_ready is high and shifts out start, data and stop bits.
module styx_uart #(
  parameter int CLKS_PER_BIT = 217
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic       tx,
  output logic       rx_valid,
  output logic [7:0] rx_data,
  input  logic       rx_ack,
  output logic       rx_overrun,
  input  logic       tx_valid,
  input  logic [7:0] tx_data,
  output logic       tx_ready
);
  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  // ---------------- receiver ----------------
  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rst_t;
  rst_t          rstate;
  logic [CW-1:0] rcnt;
  logic [2:0]    rbit;
  logic [7:0]    rshift;
  logic          rx_s1, rx_s2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_s1 <= 1'b1; rx_s2 <= 1'b1;
      rstate <= R_IDLE; rcnt <= '0; rbit <= '0; rshift <= '0;
      rx_valid <= 1'b0; rx_data <= '0; rx_overrun <= 1'b0;
    end else begin
      rx_s1 <= rx;
      rx_s2 <= rx_s1;
      if (rx_ack) rx_valid <= 1'b0;
      case (rstate)
        R_IDLE: if (!rx_s2) begin
          rstate <= R_START;
          rcnt   <= CW'(CLKS_PER_BIT / 2);
        end
        R_START: if (rcnt == 0) begin
          if (!rx_s2) begin
            rstate <= R_DATA; rcnt <= CW'(CLKS_PER_BIT - 1); rbit <= '0;
          end else rstate <= R_IDLE;   // glitch
        end else rcnt <= rcnt - 1'b1;
        R_DATA: if (rcnt == 0) begin
          rshift <= {rx_s2, rshift[7:1]};
          rcnt   <= CW'(CLKS_PER_BIT - 1);
          if (rbit == 3'd7) rstate <= R_STOP;
          rbit <= rbit + 1'b1;
        end else rcnt <= rcnt - 1'b1;
        R_STOP: if (rcnt == 0) begin
          rstate <= R_IDLE;
          if (rx_s2) begin
            if (rx_valid && !rx_ack) rx_overrun <= 1'b1;
            else begin
              rx_valid <= 1'b1;
              rx_data  <= rshift;
            end
          end
        end else rcnt <= rcnt - 1'b1;
      endcase
    end
  end

  // ---------------- transmitter ----------------
  logic [9:0]    tshift;
  logic [3:0]    tbits;
  logic [CW-1:0] tcnt;

  assign tx_ready = (tbits == 0);
  assign tx       = tshift[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tshift <= '1; tbits <= '0; tcnt <= '0;
    end else if (tbits == 0) begin
      if (tx_valid) begin
        tshift <= {1'b1, tx_data, 1'b0};
        tbits  <= 4'd10;
        tcnt   <= CW'(CLKS_PER_BIT - 1);
      end
    end else if (tcnt == 0) begin
      tshift <= {1'b1, tshift[9:1]};
      tbits  <= tbits - 1'b1;
      tcnt   <= CW'(CLKS_PER_BIT - 1);
    end else tcnt <= tcnt - 1'b1;
  end
endmodule
