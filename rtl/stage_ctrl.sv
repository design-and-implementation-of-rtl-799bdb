// stage_ctrl: instantaneous stage switching for the 4x4-block pipeline.
//
// What it does: the pipelined units (prediction, residual, ...) each work on
// one stage's data. The pipeline switches to the next stage as soon as every
// unit has finished its work for the current stage - not at a fixed cycle
// count. `advance` is that switching pulse. While some units are still busy
// and others have finished, the finished ones idle: those cycles are the
// pipeline bubbles and are counted, per unit and in total.
//
// How it works: `advance` = `pending` and no unit busy (combinational, so a
// new stage starts in the cycle after the last unit finishes). `unit_en`
// is high for a unit while it is busy or is being started; a unit whose
// enable is low has nothing to do and may have its clock gated.
//
// Interface: `busy[i]` from each unit; `pending` when the next stage has
// work to issue. Counters are 32-bit, cleared by reset.
//
// Document vs. own choice: the switching rule follows the document; the
// counters and the enable outputs are this design's way of exposing it.
module stage_ctrl #(
  parameter int unsigned NU = 2      // number of pipelined units
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NU-1:0] busy,
  input  logic          pending,
  output logic          advance,
  output logic [NU-1:0] unit_en,
  output logic [31:0]   stage_cnt,
  output logic [31:0]   bubble_cnt,       // cycles with at least one unit waiting
  output logic [31:0]   unit_wait [NU]    // per unit: cycles idle while another is busy
);
  assign advance = pending && (busy == '0);
  assign unit_en = busy | {NU{advance}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_cnt  <= '0;
      bubble_cnt <= '0;
      unit_wait  <= '{default: '0};
    end else begin
      if (advance) stage_cnt <= stage_cnt + 32'd1;
      if (busy != '0 && busy != '1) bubble_cnt <= bubble_cnt + 32'd1;
      for (int i = 0; i < NU; i++)
        if (!busy[i] && busy != '0) unit_wait[i] <= unit_wait[i] + 32'd1;
    end
  end
endmodule
