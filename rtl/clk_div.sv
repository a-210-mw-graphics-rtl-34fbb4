// clk_div: programmable clock divider used by the power optimizer. The
// output is the input clock divided by `div` (1..16); `div` = 1 passes the
// input clock through. For even `div` the duty cycle is 50 %, for odd `div`
// the output is high for floor(div/2) input cycles. The output changes on
// rising edges of the input, so it is edge-aligned with it.
module clk_div (
  input  logic       rst_n,
  input  logic       clk_in,
  input  logic [4:0] div,
  output logic       clk_out
);
  logic [4:0] cnt;
  logic       q;

  always_ff @(posedge clk_in or negedge rst_n)
    if (!rst_n) begin
      cnt <= '0;
      q   <= 1'b0;
    end else begin
      if (cnt + 5'd1 >= div) cnt <= '0;
      else                   cnt <= cnt + 5'd1;
      q <= ((cnt + 5'd1 >= div) ? 5'd0 : cnt + 5'd1) < (div >> 1);
    end

  assign clk_out = (div <= 5'd1) ? clk_in : q;
endmodule
