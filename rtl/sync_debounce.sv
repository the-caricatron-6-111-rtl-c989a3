// Push-button conditioner. The raw button passes through two registers to
// bring it into the system clock domain. When the synchronised button becomes
// active a single-cycle pulse is produced and a lockout counter starts; the
// button is ignored until the counter has run LOCKOUT_CYCLES cycles (about one
// second at 27 MHz by default), which swallows contact bounce and repeats.
// With LOCKOUT_CYCLES = 0 the module is a plain synchroniser whose output is
// the synchronised level (used for the reset button).
// Interface: btn (asynchronous), pulse (clk domain). Latency: 3 clocks from a
// button edge to the pulse.
// In the synchroniser form (LOCKOUT_CYCLES = 0) reset, the third register
// and the counter have no use and are left unused.
module sync_debounce #(
  parameter int unsigned LOCKOUT_CYCLES = 27_000_000
) (
  input  logic clk,
  input  logic reset,
  input  logic btn,
  output logic pulse
);
  logic s1, s2, s2_q;
  logic [31:0] count;

  always_ff @(posedge clk) begin
    s1 <= btn;
    s2 <= s1;
    s2_q <= s2;
  end

  generate
    if (LOCKOUT_CYCLES == 0) begin : g_level
      assign pulse = s2;
      assign count = '0;
    end else begin : g_pulse
      always_ff @(posedge clk) begin
        if (reset) begin
          count <= '0;
          pulse <= 1'b0;
        end else begin
          pulse <= 1'b0;
          if (count != 0) begin
            count <= (count >= 32'(LOCKOUT_CYCLES - 1)) ? '0 : count + 1;
          end else if (s2 && !s2_q) begin
            pulse <= 1'b1;
            count <= 32'd1;
          end
        end
      end
    end
  endgenerate
endmodule
