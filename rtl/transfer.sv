// transfer: Transfer PE. Copies one compressed video segment (400 bytes held
// as 100 big-endian 32-bit words) from the external CompressedFrame memory
// into the segment buffer, bank seg[0] (ping-pong with the segment parser
// and pass-1 parser, which read the other bank).
//
// On start it issues one read per cycle while cf_ready is high, word address
// seg*100+i; returned words (cf_rvalid, in order, any latency) are written to
// sb_waddr = {seg[0], index}. done pulses one cycle after the last word has
// been written: about 100 cycles plus the memory latency per segment.
// The document names this PE and its memory; the word width and the
// ready/valid read port are this design's choice.
module transfer
  import dvc_pkg::*;
#(
  parameter int unsigned CF_AW = 17
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [SEGW-1:0]  seg,
  output logic             done,
  // CompressedFrame read port
  output logic             cf_req,
  output logic [CF_AW-1:0] cf_addr,
  input  logic             cf_ready,
  input  logic             cf_rvalid,
  input  logic [31:0]      cf_rdata,
  // segment buffer write port
  output logic             sb_we,
  output logic [7:0]       sb_waddr,
  output logic [31:0]      sb_wdata
);
  logic            busy;
  logic [6:0]      n_req, n_rsp;
  logic            bank;
  logic [CF_AW-1:0] base;

  assign cf_req  = busy && (n_req < 7'(VS_WORDS));
  assign cf_addr = base + CF_AW'(n_req);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      n_req <= '0;
      n_rsp <= '0;
      bank  <= 1'b0;
      base  <= '0;
      done  <= 1'b0;
      sb_we <= 1'b0;
      sb_waddr <= '0;
      sb_wdata <= '0;
    end else begin
      done  <= 1'b0;
      sb_we <= 1'b0;
      if (start) begin
        busy  <= 1'b1;
        n_req <= '0;
        n_rsp <= '0;
        bank  <= seg[0];
        base  <= CF_AW'(seg * VS_WORDS);
      end else if (busy) begin
        if (cf_req && cf_ready) n_req <= n_req + 7'd1;
        if (cf_rvalid) begin
          sb_we    <= 1'b1;
          sb_waddr <= {bank, n_rsp};
          sb_wdata <= cf_rdata;
          n_rsp    <= n_rsp + 7'd1;
          if (n_rsp == 7'(VS_WORDS - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end
endmodule
