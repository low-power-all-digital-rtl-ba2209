`timescale 1ps/1fs
// flash_tdc_2level: behavioural model of the 2-level flash time-to-digital
// converter (the delay cells are modelled with delays; the flip-flops and
// the selection multiplexer are ordinary logic).
//
// It measures the high half-period of the reference Ref_N in units of one
// small delay cell t, with 12 flip-flops instead of the 40 a single-level
// flash TDC of the same range would need.
//   Round 1 (first reference cycle after start): the rising edge of Ref_N
//   runs down 4 large cells of 8t each.  At the falling edge 4 flip-flops
//   sample the large-cell outputs (Q1, thermometer code).
//   Round 2 (second cycle): the multiplexer, steered by Q1, picks the output
//   of the last large cell the edge passed in round 1 and feeds it to 8
//   small cells of t each; at the falling edge 8 flip-flops sample them
//   (Q2, thermometer).  done rises with that falling edge.
// A half period of h*t gives Q1 = ones(min(4, floor(h/8))) and
// Q2 = ones(min(8, floor(h - 8*L1))).  A new measurement starts when
// start_n is released (asynchronous, active low); the first round begins
// with the first rising edge of Ref_N after the release.
// Interface and cell counts follow the 2-level flash TDC architecture;
// T_CELL defaults to the 165 ps delay of a coarse DCO cell.
module flash_tdc_2level #(
  parameter real T_CELL = 165.0           // ps, small delay cell t
) (
  input  logic       start_n,             // low: clear, high: measure
  input  logic       ref_n,               // Ref_N, divided reference clock
  output logic [3:0] q1,                  // 1st level flip-flops
  output logic [7:0] q2,                  // 2nd level flip-flops
  output logic       done                 // q1 and q2 are valid
);

  logic [1:0] round;                      // 0: round 1, 1: round 2, 2: done
  logic       launch;
  logic [4:0] lg;                      // lg[i]: after i large cells
  logic [8:0] sm;
  logic       sel_out;

  // Only the two measuring edges enter the delay line.
  assign launch   = ref_n & start_n & (round < 2'd2);
  assign lg[0] = launch;
  // each cell is a transport delay; the cells start out low
  for (genvar i = 0; i < 4; i++) begin : g_large
    logic o = 1'b0;
    always @(lg[i]) o <= #(8.0 * T_CELL) lg[i];
    assign lg[i+1] = o;
  end

  // delay-selection multiplexer, thermometer-steered by q1
  always_comb begin
    sel_out = lg[0];
    for (int i = 0; i < 4; i++) if (q1[i]) sel_out = lg[i+1];
  end

  assign sm[0] = sel_out & (round == 2'd1);
  for (genvar j = 0; j < 8; j++) begin : g_small
    logic o = 1'b0;
    always @(sm[j]) o <= #(T_CELL) sm[j];
    assign sm[j+1] = o;
  end

  // a round only counts once a rising edge has entered the line after start
  logic armed;
  always_ff @(posedge ref_n or negedge start_n) begin
    if (!start_n) armed <= 1'b0;
    else          armed <= 1'b1;
  end

  always_ff @(negedge ref_n or negedge start_n) begin
    if (!start_n) begin
      round <= 2'd0;
      q1    <= '0;
      q2    <= '0;
    end else if (armed) begin
      case (round)
        2'd0:    begin q1 <= lg[4:1]; round <= 2'd1; end
        2'd1:    begin q2 <= sm[8:1]; round <= 2'd2; end
        default: ;
      endcase
    end
  end

  assign done = (round == 2'd2);

endmodule
