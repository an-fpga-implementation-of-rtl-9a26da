// uart_rx -- serial receiver for the PC link, 8 data bits, no parity, 1 stop bit.
//
// The line is synchronised with two flip-flops. A falling edge starts a frame;
// the start bit is checked again half a bit later, then each data bit (LSB
// first) is sampled in the middle of its bit period, CLKS_PER_BIT clock cycles
// apart. If the stop bit is high the byte is presented on `data` with a
// one-cycle `valid` pulse; a frame with a low stop bit is dropped.
// The document only names a link from a PC terminal program to the FPGA board;
// the frame format and the sampling scheme are this design's choice.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 564   // 65 MHz / 115200 baud
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data
);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;
  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  state_e        st_q;
  logic [CW-1:0] cnt_q;
  logic [2:0]    bit_q;
  logic [7:0]    sh_q;
  logic [1:0]    sync_q;
  logic          rx;

  assign rx = sync_q[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync_q <= 2'b11;
      st_q   <= IDLE;
      cnt_q  <= '0;
      bit_q  <= '0;
      sh_q   <= '0;
      valid  <= 1'b0;
      data   <= '0;
    end else begin
      sync_q <= {sync_q[0], rxd};
      valid  <= 1'b0;
      unique case (st_q)
        IDLE: if (!rx) begin
          st_q  <= START;
          cnt_q <= '0;
        end
        START: begin
          if (cnt_q == CW'(CLKS_PER_BIT / 2 - 1)) begin
            cnt_q <= '0;
            bit_q <= '0;
            st_q  <= rx ? IDLE : DATA;   // glitch, not a start bit
          end else cnt_q <= cnt_q + 1'b1;
        end
        DATA: begin
          if (cnt_q == CW'(CLKS_PER_BIT - 1)) begin
            cnt_q <= '0;
            sh_q  <= {rx, sh_q[7:1]};
            bit_q <= bit_q + 1'b1;
            if (bit_q == 3'd7) st_q <= STOP;
          end else cnt_q <= cnt_q + 1'b1;
        end
        STOP: begin
          if (cnt_q == CW'(CLKS_PER_BIT - 1)) begin
            cnt_q <= '0;
            st_q  <= IDLE;
            if (rx) begin
              valid <= 1'b1;
              data  <= sh_q;
            end
          end else cnt_q <= cnt_q + 1'b1;
        end
        default: st_q <= IDLE;
      endcase
    end
  end

endmodule
