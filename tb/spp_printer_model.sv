// Behavioural model of a printer on a Centronics (SPP) port for testbenches.
// It latches pp_data on the rising (trailing) edge of nStrobe, raises busy at
// the falling edge and keeps it up for BUSY_CYCLES clocks, then pulses nAck
// low for 4 clocks and drops busy. It checks that the data was stable since
// SETUP_MIN clocks before the strobe and that the strobe lasted STROBE_MIN
// clocks, counting violations. Received bytes are kept in a queue.
module spp_printer_model #(
  parameter int BUSY_CYCLES = 30,
  parameter int SETUP_MIN   = 14,
  parameter int STROBE_MIN  = 14
) (
  input  logic       clk,
  input  logic [7:0] pp_data,
  input  logic       pp_nstrobe,
  output logic       pp_busy,
  output logic       pp_nack
);
  byte unsigned rx [$];
  int violations = 0, busy_cnt = 0, data_stable = 0, strobe_len = 0, busy_events = 0;
  logic [7:0] data_q = 0;
  logic strobe_q = 1;

  initial begin pp_busy = 0; pp_nack = 1; end

  always @(posedge clk) begin
    data_q   <= pp_data;
    strobe_q <= pp_nstrobe;
    data_stable <= (pp_data == data_q) ? data_stable + 1 : 0;
    if (!pp_nstrobe && strobe_q) begin
      if (data_stable + 1 < SETUP_MIN) violations <= violations + 1;
      pp_busy <= 1;
      busy_cnt <= BUSY_CYCLES;
      busy_events <= busy_events + 1;
      strobe_len <= 1;
    end else if (!pp_nstrobe) strobe_len <= strobe_len + 1;
    if (pp_nstrobe && !strobe_q) begin
      rx.push_back(pp_data);
      if (strobe_len < STROBE_MIN) violations <= violations + 1;
    end
    if (busy_cnt > 0) begin
      busy_cnt <= busy_cnt - 1;
      if (busy_cnt <= 5 && busy_cnt > 1) pp_nack <= 0;
      if (busy_cnt == 1) begin pp_busy <= 0; pp_nack <= 1; end
    end
  end
endmodule
