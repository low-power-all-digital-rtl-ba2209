`timescale 1ps/1fs
// smd_delay_path: behavioural model of the delay path of the all-digital
// synchronous mirror delay (ADSMD).
//
// Behavioural model: all cell delays are transport delays; the forward
// delay line (FDL) is a chain of AND cells so that the mirror point is
// found as in the circuit, but the backward path is a delay computed from
// the latched mirror point rather than a netlist.
// Path: clk_in -> input buffer (IB, Td1) -> ib_out -> dummy delay line
// (DDL = Td1 + Td2 + Td3 + Td4) -> FDL of N_CELLS AND cells (T_AND each,
// gated by BLK) ... At the rising edge of ib_out selected by latch, the
// edge-triggered mirror delay cells (EMDC) mark how many FDL cells the
// previous edge has passed (k, position of the rising front).  From
// then on each ib_out edge travels DDL + k cells (forward) + EMDC (Td3) +
// k cells (backward delay line, BDL) + fine-tuning delay line (FTDL,
// Td4 + FTC * T_FT) + clock driver (CD, Td2):
//   total = 2*Td1 + 2*Td2 + 2*Td3 + 2*Td4 + 2*k*T_AND + FTC*T_FT
// which is 2*Tck minus twice the FDL quantisation error; the FTC adds up
// to 7 * T_FT to cancel it.  clk_out stays low until the mirror point is
// latched.  Only rising edges are measured, so any duty cycle works.
// Interface: clk_in, rst_n, blk (0 blocks the FDL), latch (capture mirror
// point at this ib_out rising edge), ftc[2:0] -> ib_out, clk_out,
// mirror_k (latched k), valid.
// Follows the document: DDL / FDL / MCC (EMDC) / BDL / FTDL / CD
// structure, the delay-matching sum, 3-bit FTC, BLK.  This design's
// choices: all delay values (not given) and N_CELLS.
module smd_delay_path #(
  parameter int unsigned N_CELLS = 64,
  parameter real T_D1  = 100.0,  // ps, input buffer
  parameter real T_D2  = 150.0,  // ps, clock driver
  parameter real T_D3  = 60.0,   // ps, EMDC
  parameter real T_D4  = 80.0,   // ps, FTDL at FTC = 0
  parameter real T_AND = 80.0,   // ps, FDL/BDL cell
  parameter real T_FT  = 24.0    // ps, FTDL step per FTC count
) (
  input  logic       clk_in,
  input  logic       rst_n,
  input  logic       blk,
  input  logic       latch,
  input  logic [2:0] ftc,
  output logic       ib_out,
  output logic       clk_out,
  output logic [6:0] mirror_k,
  output logic       valid
);
  // input buffer
  logic ib = 1'b0;
  always @(clk_in) ib <= #(T_D1) clk_in;
  assign ib_out = ib;

  // dummy delay line
  logic ddl = 1'b0;
  always @(ib) ddl <= #(T_D1 + T_D2 + T_D3 + T_D4) ib;

  // forward delay line of AND cells, blocked by BLK
  // armed at the first IB_OUT rising edge after reset, so that a clock
  // level already high when reset is released does not enter the FDL
  logic armed;
  always_ff @(posedge ib or negedge rst_n) begin
    if (!rst_n) armed <= 1'b0;
    else        armed <= 1'b1;
  end

  logic [N_CELLS:0] fdl;
  assign fdl[0] = ddl & blk & armed;
  for (genvar i = 0; i < N_CELLS; i++) begin : g_fdl
    logic o = 1'b0;
    always @(fdl[i]) o <= #(T_AND) fdl[i];
    assign fdl[i+1] = o & blk;
  end

  // mirror control: each EMDC compares neighbouring cell outputs; the
  // leading rising front is the last cell that is high with its successor
  // low (the pulse tail may already be low behind it for a short duty)
  function automatic logic [6:0] front(input logic [N_CELLS-1:0] c);
    logic [6:0] k;
    k = '0;
    for (int i = 0; i < N_CELLS; i++) if (c[i]) k = 7'(i + 1);
    return k;
  endfunction

  // mirror control: edge-triggered capture of the FDL state
  always_ff @(posedge ib or negedge rst_n) begin
    if (!rst_n) begin
      mirror_k <= '0;
      valid    <= 1'b0;
    end else if (latch) begin
      mirror_k <= front(fdl[N_CELLS:1]);
      valid    <= 1'b1;
    end
  end

  // locked path: forward k cells + backward k cells (one chain of 2*N_CELLS
  // AND cells tapped at 2k) + EMDC + FTDL + CD.  Every element is a short
  // transport delay, so several clock edges can be in flight at once.
  logic [2*N_CELLS:0] lp;
  assign lp[0] = ddl & valid;
  for (genvar i = 0; i < 2 * N_CELLS; i++) begin : g_lp
    logic o = 1'b0;
    always @(lp[i]) o <= #(T_AND) lp[i];
    assign lp[i+1] = o;
  end
  logic tap, mir = 1'b0, ft = 1'b0, outd = 1'b0;
  assign tap = lp[2 * mirror_k];
  always @(tap) mir  <= #(T_D3) tap;
  always @(mir) ft   <= #(T_D4 + T_FT * real'(ftc)) mir;
  always @(ft)  outd <= #(T_D2) ft;
  assign clk_out = outd;
endmodule
