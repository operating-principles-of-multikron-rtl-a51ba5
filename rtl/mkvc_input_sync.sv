// mkvc_input_sync: brings the Timestamp clock and the external event
// signals X0..X15 into the Node clock domain.
//
// Each input passes two flip-flops (metastability guard) and a third flop
// that holds the previous sample; a rising edge is reported as a one-Node-
// clock pulse. The synchronized level of each external signal is also given,
// for the "clock gated by EXT high" counting sources. Because every edge must
// be seen as a separate high and low sample, the Timestamp clock may be at
// most a third of the Node clock and the external signals must stay high and
// low for at least one Node clock each, which matches the chip's stated
// limits. The synchronizer itself is this design's; the chip only requires
// that these inputs be counted on their rising edges.
//
// Latency: a rising input edge gives a pulse two to three Node clocks later.
module mkvc_input_sync #(
  parameter int unsigned NEXT = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ts_clk,
  input  logic [NEXT-1:0] ext,
  output logic            ts_rise,
  output logic [NEXT-1:0] ext_lvl,
  output logic [NEXT-1:0] ext_rise
);

  logic [2:0]      ts_sh;
  logic [NEXT-1:0] ext_s1, ext_s2, ext_s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts_sh  <= '0;
      ext_s1 <= '0;
      ext_s2 <= '0;
      ext_s3 <= '0;
    end else begin
      ts_sh  <= {ts_sh[1:0], ts_clk};
      ext_s1 <= ext;
      ext_s2 <= ext_s1;
      ext_s3 <= ext_s2;
    end
  end

  assign ts_rise  = ts_sh[1] && !ts_sh[2];
  assign ext_lvl  = ext_s2;
  assign ext_rise = ext_s2 & ~ext_s3;

  // The Timestamp clock may run at most at a third of the Node clock
  assert property (@(posedge clk) disable iff (!rst_n) ts_rise |=> !ts_rise ##1 !ts_rise);

endmodule
