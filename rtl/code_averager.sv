`timescale 1ps/1fs
// code_averager: averaging mechanism of the binary-search ADPLL.
//
// Watches the tracking DCO code once per reference cycle (when sample is
// high), keeps its maximum and minimum over a window of WINDOW samples, and
// at the end of each window publishes avg_code = (max + min) / 2 for the
// average DCO, which then runs free of the tracking dither.  avg_valid goes
// high after the first full window.  The window restarts with the next
// sample.  Window length 256 and the max/min average follow the ADPLL
// description; the sample qualifier is this design's choice.
module code_averager #(
  parameter int unsigned W      = 17,  // DCO code width (DCO code[16:0])
  parameter int unsigned WINDOW = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sample,
  input  logic [W-1:0] code,
  output logic [W-1:0] avg_code,
  output logic         avg_valid
);

  logic [W-1:0] mx, mn;
  logic [$clog2(WINDOW+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mx        <= '0;
      mn        <= '1;
      cnt       <= '0;
      avg_code  <= {1'b1, {(W-1){1'b0}}};
      avg_valid <= 1'b0;
    end else if (sample) begin
      logic [W-1:0] nmx, nmn;
      nmx = (cnt == '0 || code > mx) ? code : mx;
      nmn = (cnt == '0 || code < mn) ? code : mn;
      if (32'(cnt) == WINDOW - 1) begin
        avg_code  <= W'(({1'b0, nmx} + {1'b0, nmn}) >> 1);
        avg_valid <= 1'b1;
        cnt       <= '0;
      end else begin
        cnt <= cnt + 1'b1;
      end
      mx <= nmx;
      mn <= nmn;
    end
  end

endmodule
