// decoder_controller: DecoderController. Runs the decoding of one frame as a
// sequence of iterations of the PE pipeline.
//
// A frame_start pulse (the host's signal that a compressed frame is in
// memory) begins a frame. In iteration i, pipeline stage k works on segment
// i-k if 0 <= i-k < NUM_VS: the controller pulses stage_start for those
// stages, gives each its segment index on stage_seg, pulses it_start with
// stage_active for the signal combiner, and waits for all_done. No stage
// begins a new segment before every stage has finished the previous one.
// After NUM_VS+NSTAGE-1 iterations it pulses frame_done (the host's signal
// to read the decoded frame). Starting each iteration takes 2 cycles beyond
// the slowest stage.
module decoder_controller
  import dvc_pkg::*;
#(
  parameter int unsigned NUM_VS = 1215,
  parameter int unsigned NST    = NSTAGE
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      frame_start,
  input  logic                      all_done,
  output logic                      it_start,
  output logic [NST-1:0]            stage_start,
  output logic [NST-1:0]            stage_active,
  output logic [NST-1:0][SEGW-1:0]  stage_seg,
  output logic                      frame_done,
  output logic                      busy,
  output logic [SEGW:0]             iteration
);
  localparam int unsigned NIT = NUM_VS + NST - 1;
  typedef enum logic [1:0] {IDLE, LAUNCH, WAIT} st_e;
  st_e st;

  always_comb begin
    for (int k = 0; k < NST; k++) begin
      stage_active[k] = (32'(iteration) >= k) && (32'(iteration) - k < NUM_VS);
      stage_seg[k]    = SEGW'(32'(iteration) - k);
    end
  end
  assign busy = (st != IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= IDLE; iteration <= '0; it_start <= 1'b0; stage_start <= '0; frame_done <= 1'b0;
    end else begin
      it_start    <= 1'b0;
      stage_start <= '0;
      frame_done  <= 1'b0;
      unique case (st)
        IDLE: if (frame_start) begin st <= LAUNCH; iteration <= '0; end
        LAUNCH: begin
          it_start    <= 1'b1;
          stage_start <= stage_active;
          st          <= WAIT;
        end
        WAIT: if (all_done) begin
          if (32'(iteration) == NIT - 1) begin
            st         <= IDLE;
            frame_done <= 1'b1;
          end else begin
            iteration <= iteration + 1'b1;
            st        <= LAUNCH;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
