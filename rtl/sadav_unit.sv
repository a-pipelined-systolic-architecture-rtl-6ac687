// sadav_unit: running average SADav of the minimum SADs of the previous
// macroblocks, used by both thresholds of the HORB search.
//
// update adds sad to a 32-bit sum and increments a 16-bit count (when the
// count is full, both are halved first, which keeps the average); then a
// restoring divider computes sadav = sum / count in 32 cycles, during which
// ready is low. clear empties sum and count; have_avg is low until the first
// update, telling the controller that no average exists yet. Averaging over
// all previous macroblocks is from the document; the widths, the halving
// and the sequential divider are this design's.
module sadav_unit
  import horb_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic update,
  input  sad_t sad,
  output sad_t sadav,
  output logic have_avg,
  output logic ready
);

  logic [31:0] sum, quo;
  logic [15:0] cnt;
  logic [16:0] rem;
  logic [5:0]  step;   // 0: idle, else bits left
  logic [31:0] num;
  logic [16:0] trial;

  assign ready    = (step == 0);
  assign have_avg = (cnt != 0);
  assign trial    = {rem[15:0], num[31]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum <= '0; cnt <= '0; sadav <= '0; step <= '0; rem <= '0; quo <= '0; num <= '0;
    end else if (clear) begin
      sum <= '0; cnt <= '0; sadav <= '0; step <= '0;
    end else if (update && ready) begin
      if (cnt == 16'hffff) begin
        sum <= (sum >> 1) + 32'(sad);
        cnt <= (cnt >> 1) + 1'b1;
        num <= (sum >> 1) + 32'(sad);
      end else begin
        sum <= sum + 32'(sad);
        cnt <= cnt + 1'b1;
        num <= sum + 32'(sad);
      end
      rem  <= '0;
      quo  <= '0;
      step <= 6'd32;
    end else if (step != 0) begin
      // one restoring division step per cycle, divisor = cnt
      if (trial >= {1'b0, cnt}) begin
        rem <= trial - {1'b0, cnt};
        quo <= {quo[30:0], 1'b1};
      end else begin
        rem <= trial;
        quo <= {quo[30:0], 1'b0};
      end
      num  <= num << 1;
      step <= step - 1'b1;
      if (step == 6'd1)
        sadav <= (trial >= {1'b0, cnt}) ? sad_t'({quo[30:0], 1'b1}) : sad_t'({quo[30:0], 1'b0});
    end
  end

endmodule
