// square_wave: 50 % duty-cycle square wave of programmable frequency.
//
// A counter runs from 0 to half_period-1 and toggles the output each time it
// wraps, so the output frequency is f_clk / (2 * half_period).  A new
// half_period takes effect at the next toggle; 0 is treated as 1.  While `en`
// is low the output is held low.  The 50 % square wave at varying frequencies
// is what the design calls for; the toggle counter is this implementation's
// choice.
module square_wave #(
  parameter int unsigned DIV_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [DIV_W-1:0] half_period,
  output logic             sq
);

  logic [DIV_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      cnt <= '0;
      sq  <= 1'b0;
    end else if (cnt + 1'b1 >= half_period) begin
      cnt <= '0;
      sq  <= ~sq;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

endmodule
