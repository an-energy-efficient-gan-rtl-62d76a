// conv_ctrl: Conv controller of a DB-Conv core.
//
// On start it steps through the input-channel slices of one pass, one slice
// per cycle (cin_groups cycles; 16 for a 256-channel layer with 16 PE rows),
// issuing the weight-buffer read and activation-slice select for each and
// marking the first and last slice for the aggregation engine.
//
// issuing is high while slices after the current one remain to be issued:
// the shared activation window is still needed and must not shift. It drops
// in the cycle of the last slice, because that slice samples the window at
// the same clock edge at which a shift would take effect; this lets the
// next pass start right after the last slice, with no bubble. ready says a new pass may start now. It is low
// while issuing, and also while the aggregation engine still has more queued
// outputs than the new pass leaves time to drain: a pass ends
// cin_groups + 1 cycles after its start, and the engine's serial output must
// be empty by then (queued = piso_cnt, or nout + 2 while the previous pass's
// last slice is still in the pipeline). Low ready with a free window is a
// core stall. The slice-per-cycle sequencing follows the source design's
// 16-cycle pass; the ready rule is this design's.
module conv_ctrl #(
  parameter int unsigned GRP_MAX = 16,
  localparam int unsigned GW = (GRP_MAX > 1) ? $clog2(GRP_MAX) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [4:0]    cin_groups,   // slices per pass, 1 .. GRP_MAX
  input  logic [3:0]    piso_cnt,     // values queued in the aggregation engine
  input  logic          pending,      // a last slice is in the pipeline
  input  logic [3:0]    nout,         // values per pass (2 Conv, 8 TConv)
  output logic          issue,        // a slice is issued this cycle
  output logic [GW-1:0] grp,          // slice being issued
  output logic          first,
  output logic          last,
  output logic          issuing,
  output logic          ready
);
  logic [GW-1:0] cnt;
  logic          run;
  logic [4:0]    queued;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      cnt <= '0;
    end else if (start && ready) begin
      run <= (cin_groups > 5'd1);
      cnt <= (cin_groups > 5'd1) ? GW'(1) : '0;
    end else if (run) begin
      if (5'(cnt) == cin_groups - 5'd1) begin
        run <= 1'b0;
        cnt <= '0;
      end else begin
        cnt <= cnt + GW'(1);
      end
    end
  end

  always_comb begin
    queued  = pending ? 5'(nout) + 5'd2 : 5'(piso_cnt);
    ready   = !run && (queued <= cin_groups);
    issue   = (start && ready) || run;
    grp     = run ? cnt : '0;
    first   = start && ready;
    last    = issue && (5'(grp) == cin_groups - 5'd1);
    issuing = run && !last;
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> ready)
    else $error("conv_ctrl: start while not ready");
endmodule
