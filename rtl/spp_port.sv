// Host side of a Centronics (SPP, IEEE 1284 compatibility mode) parallel
// port. A byte is taken with a valid/ready handshake when the printer is not
// busy; it is driven on pp_data for T_SETUP clocks, then nStrobe is pulsed
// low for T_STROBE clocks, the data is held T_HOLD clocks more, and the port
// waits until the printer has dropped busy (or pulsed nAck) before accepting
// the next byte. The original design names the protocol; the timing values (0.5 us
// each, 14 clocks at 27 MHz) are the standard's minimums, not the original design's.
module spp_port #(
  parameter int unsigned T_SETUP  = 14,
  parameter int unsigned T_STROBE = 14,
  parameter int unsigned T_HOLD   = 14
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic [7:0] pp_data,
  output logic       pp_nstrobe,
  input  logic       pp_busy,
  input  logic       pp_nack
);
  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_STROBE, S_HOLD, S_WAIT} sstate_t;
  sstate_t     st;
  logic [15:0] cnt;
  logic        busy_s1, busy_s2, nack_s1, nack_s2;

  always_ff @(posedge clk) begin
    busy_s1 <= pp_busy;  busy_s2 <= busy_s1;
    nack_s1 <= pp_nack;  nack_s2 <= nack_s1;
  end

  assign ready = (st == S_IDLE) && !busy_s2;

  always_ff @(posedge clk) begin
    if (reset) begin
      st         <= S_IDLE;
      cnt        <= '0;
      pp_data    <= '0;
      pp_nstrobe <= 1'b1;
    end else begin
      unique case (st)
        S_IDLE: if (valid && ready) begin
          pp_data <= data;
          cnt     <= '0;
          st      <= S_SETUP;
        end
        S_SETUP: begin
          cnt <= cnt + 1'b1;
          if (cnt == 16'(T_SETUP - 1)) begin
            cnt        <= '0;
            pp_nstrobe <= 1'b0;
            st         <= S_STROBE;
          end
        end
        S_STROBE: begin
          cnt <= cnt + 1'b1;
          if (cnt == 16'(T_STROBE - 1)) begin
            cnt        <= '0;
            pp_nstrobe <= 1'b1;
            st         <= S_HOLD;
          end
        end
        S_HOLD: begin
          cnt <= cnt + 1'b1;
          if (cnt == 16'(T_HOLD - 1)) st <= S_WAIT;
        end
        S_WAIT: if (!busy_s2 || !nack_s2) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
