// dds_dac_mock: pseudo DAC that rebuilds the full-rate sample stream.
//
// Not a converter: two 2:1 switches interleave the two 1 GSPS data paths
// into one 2 GSPS stream. Switch1 takes DB0 then DB1 onto SINE, Switch2
// takes Phase_DB0 then Phase_DB1 onto PHASE, so the phase/amplitude pair of
// every sample can be observed together. The switches and their inputs are
// the design's; output registers and the DB0-first order are this design's
// choices.
//
// Timing: clk is the sample clock and ce_fast, high one cycle in two, is the
// enable on which the multiplexers upstream load a new pair. On the edge
// after that load SINE/PHASE take DB0/Phase_DB0 of the pair; on the next
// edge, the ce_fast edge on which the muxes move on, they take
// DB1/Phase_DB1 of the same pair (still on the inputs before the edge). So
// a pair reaches the output one and two clocks after it is loaded.
module dds_dac_mock #(
  parameter int unsigned PHASE_W = dds_pkg::PHASE_W,
  parameter int unsigned AMP_W   = dds_pkg::AMP_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce_fast,
  input  logic signed [AMP_W-1:0] db0,
  input  logic signed [AMP_W-1:0] db1,
  input  logic [PHASE_W-1:0]      phase_db0,
  input  logic [PHASE_W-1:0]      phase_db1,
  output logic signed [AMP_W-1:0] sine,
  output logic [PHASE_W-1:0]      phase
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sine  <= '0;
      phase <= '0;
    end else if (ce_fast) begin
      sine  <= db1;        // Switch1, second half of the pair
      phase <= phase_db1;  // Switch2, second half of the pair
    end else begin
      sine  <= db0;        // Switch1, first half of the pair
      phase <= phase_db0;  // Switch2, first half of the pair
    end
  end

  a_fast_alternates: assert property (@(posedge clk) disable iff (!rst_n) ce_fast |=> !ce_fast);
endmodule
