// mkvc_timestamp: 56-bit Timestamp counter and the divided timestamp
// clocks used as counting sources.
//
// The counter adds one for every Timestamp clock edge (ts_rise, already in
// the Node clock domain). Only the hardware reset clears it: a software reset
// leaves it running, so that chips reset together stay synchronized. In test
// mode (TESTB low) it stops following the Timestamp clock and instead can be
// loaded (wr_en) or stepped by one (inc_en) from the processor; outside test
// mode those two requests are ignored. Two decimal prescalers derive the
// TSclk/10 and TSclk/100 pulses (tick10, tick100) from ts_rise; tick1 is
// ts_rise itself. All outputs are registered or one gate from a register.
//
// Width, reset rules and test-mode access follow the chip description.
// Stopping the count in test mode and clearing the prescalers only at
// hardware reset are this design's choices.
module mkvc_timestamp
  import mkvc_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ts_rise,
  input  logic           test_mode,
  input  logic           wr_en,
  input  logic [TSW-1:0] wr_data,
  input  logic           inc_en,
  output logic [TSW-1:0] ts,
  output logic           tick1,
  output logic           tick10,
  output logic           tick100
);

  logic [3:0] div10, div100;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts <= '0;
    end else if (test_mode) begin
      if (wr_en)       ts <= wr_data;
      else if (inc_en) ts <= ts + 1'b1;
    end else if (ts_rise) begin
      ts <= ts + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div10  <= '0;
      div100 <= '0;
    end else if (ts_rise) begin
      if (div10 == 4'd9) begin
        div10  <= '0;
        div100 <= (div100 == 4'd9) ? 4'd0 : div100 + 1'b1;
      end else begin
        div10 <= div10 + 1'b1;
      end
    end
  end

  assign tick1   = ts_rise;
  assign tick10  = ts_rise && (div10 == 4'd9);
  assign tick100 = ts_rise && (div10 == 4'd9) && (div100 == 4'd9);

endmodule
