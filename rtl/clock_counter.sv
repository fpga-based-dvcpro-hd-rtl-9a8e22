// clock_counter: ClockCounter with per-PE duration capture, the measurement
// used to find the slowest processing element against the real-time budget.
// A free-running 32-bit counter runs from reset. Each PE's entry (its start
// pulse) and exit (its done pulse) are time-stamped; the difference, the PE's
// cycle count for the current segment, is stored in last_dur and the largest
// value since clr_max in max_dur (16-bit, saturating).
module clock_counter #(
  parameter int unsigned N = 11
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N-1:0]       pe_start,
  input  logic [N-1:0]       pe_done,
  input  logic               clr_max,
  output logic [31:0]        cycles,
  output logic [N-1:0][15:0] last_dur,
  output logic [N-1:0][15:0] max_dur
);
  logic [N-1:0][31:0] entry;
  logic [31:0] d [N];

  always_comb
    for (int i = 0; i < N; i++) d[i] = cycles - entry[i];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cycles <= '0; entry <= '0; last_dur <= '0; max_dur <= '0;
    end else begin
      cycles <= cycles + 32'd1;
      for (int i = 0; i < N; i++) begin
        if (clr_max) max_dur[i] <= '0;
        if (pe_start[i]) entry[i] <= cycles;
        if (pe_done[i]) begin
          last_dur[i] <= (d[i] > 32'hFFFF) ? 16'hFFFF : d[i][15:0];
          if (!clr_max && d[i][15:0] > max_dur[i] && d[i] <= 32'hFFFF) max_dur[i] <= d[i][15:0];
          else if (!clr_max && d[i] > 32'hFFFF) max_dur[i] <= 16'hFFFF;
        end
      end
    end
  end
endmodule
