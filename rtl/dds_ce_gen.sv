// dds_ce_gen: clock-enable generator for the multirate DDS.
//
// The whole design runs from one clock at the aggregate sample rate (2 GHz
// nominal), the way a multirate block diagram is mapped to hardware: slower
// rates are clock enables rather than separate clocks. A free-running
// divide-by-8 counter gives
//   ce_fast : one cycle in two  (1 GHz, the DB0/DB1 data-path rate)
//   ce_slow : one cycle in eight (250 MHz, the core rate)
// ce_slow is high only on a cycle on which ce_fast is also high (the last
// fast tick of each core cycle). Both are registered outputs. This divider
// is this design's own; the rates are the design's 250 MHz / 1 GSPS / 2 GSPS.
module dds_ce_gen #(
  parameter int unsigned FAST_DIV = 2,   // clk cycles per ce_fast
  parameter int unsigned SLOW_DIV = 8    // clk cycles per ce_slow (multiple of FAST_DIV)
) (
  input  logic clk,
  input  logic rst_n,
  output logic ce_fast,
  output logic ce_slow
);
  localparam int unsigned CW = $clog2(SLOW_DIV);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt     <= '0;
      ce_fast <= 1'b0;
      ce_slow <= 1'b0;
    end else begin
      cnt     <= (cnt == CW'(SLOW_DIV - 1)) ? '0 : cnt + 1'b1;
      ce_fast <= (32'(cnt) % FAST_DIV) == FAST_DIV - 1;
      ce_slow <= cnt == CW'(SLOW_DIV - 1);
    end
  end

  initial assert (SLOW_DIV % FAST_DIV == 0) else $error("SLOW_DIV must be a multiple of FAST_DIV");
  a_slow_on_fast: assert property (@(posedge clk) disable iff (!rst_n) ce_slow |-> ce_fast);
endmodule
