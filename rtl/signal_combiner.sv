// signal_combiner: SignalCombiner. Every decoding PE reports the end of its
// work for the current segment with a one-cycle completion pulse; this block
// gathers them and tells the decoder controller, with one pulse on all_done,
// when every PE taking part in the iteration has finished. start (one cycle)
// opens an iteration and samples active, the set of PEs that have a segment
// in it (PEs idle while the pipeline fills or drains are not waited for).
// Completions are kept in sticky flags; all_done follows one cycle after the
// last awaited completion, or one cycle after start if no PE is active.
module signal_combiner #(
  parameter int unsigned N = 11
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] active,
  input  logic [N-1:0] pe_done,
  output logic         all_done
);
  logic [N-1:0] pending;
  logic         open_it;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pending  <= '0;
      open_it  <= 1'b0;
      all_done <= 1'b0;
    end else begin
      all_done <= 1'b0;
      if (start) begin
        pending <= active;
        open_it <= 1'b1;
      end else if (open_it) begin
        if ((pending & ~pe_done) == '0) begin
          all_done <= 1'b1;
          open_it  <= 1'b0;
          pending  <= '0;
        end else pending <= pending & ~pe_done;
      end
    end
  end

  // a completion only comes from a PE that is being waited for
  a_done_expected: assert property (@(posedge clk) disable iff (!rst_n)
    (open_it && !start) |-> ((pe_done & ~pending) == '0));
endmodule
