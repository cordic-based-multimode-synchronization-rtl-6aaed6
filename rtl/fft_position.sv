// fft_position: passes the corrected samples on to the FFT, starting at the
// detected symbol boundary.
//
// The symbol boundary is known only some time after the samples it points
// at have left the CORDIC, so the corrected stream is kept in a circular
// buffer of DEPTH entries (a sample_buffer). While the boundary search runs,
// every corrected sample is written and the index of the newest one is
// tracked. When start pulses with the final boundary_idx, the block computes
// how many stored samples lie at or after the boundary. If all of them are
// still held (fewer than DEPTH), reading begins at the boundary and continues,
// in order, for as long as stored samples remain: one read per cycle, so a
// backlog drains whenever the input has gaps, and the output follows the
// input once it has caught up. If the boundary is already older than the
// buffer, late is raised and nothing is forwarded until clear.
//
// Interface: in_valid/in/in_idx is the corrected stream (in_idx increasing
// by one per sample). out_valid/out/out_idx is the forwarded stream; its
// first sample has out_idx = boundary_idx and out_first marks it. out
// appears one cycle after the read (registered RAM read). The caller must
// clear the block before each frame.
//
// The forwarding of the FFT data once the boundary counter expires, and the
// depth of 300 samples (from the 12 x 300 register files, one per rail),
// follow the reference design. Forwarding the whole stream from the
// boundary, rather than cutting it into windows, and the late flag are this
// design's choices: the cyclic prefix of the data symbols is configurable in
// 802.16d, so the window placement of later symbols is left to the FFT
// control, which gets exact indices.
module fft_position
  import sync_pkg::*;
#(
  parameter int DEPTH = 300,
  parameter int IDXW  = 32,
  localparam int AW   = $clog2(DEPTH),
  localparam int CW   = $clog2(DEPTH + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            in_valid,
  input  cplx_t           in,
  input  logic [IDXW-1:0] in_idx,
  input  logic            start,
  input  logic [IDXW-1:0] boundary_idx,
  output logic            out_valid,
  output logic            out_first,
  output cplx_t           out,
  output logic [IDXW-1:0] out_idx,
  output logic            late
);
  logic [AW-1:0]   wp, rp;        // next write slot, next read slot
  logic [IDXW-1:0] next_idx;      // index the next write will carry
  logic [CW-1:0]   stored;        // samples held (saturates at DEPTH)
  logic [CW-1:0]   pending;       // stored samples not yet forwarded
  logic            active, rd_en, first_q;
  logic [IDXW-1:0] rd_idx, span;
  logic [AW-1:0]   start_rp;

  // number of held samples at or after the boundary, and where it sits
  assign span = next_idx - boundary_idx;
  always_comb begin
    logic [AW:0] back;
    back = {1'b0, wp} - (AW+1)'(span[CW-1:0]);
    start_rp = back[AW] ? AW'(back + (AW+1)'(DEPTH)) : back[AW-1:0];
  end

  assign rd_en = active && (pending != '0);

  sample_buffer #(.DEPTH(DEPTH), .W(2*DW)) u_mem (
    .clk, .wr_en(in_valid), .wr_addr(wp), .wr_data(in),
    .rd_en, .rd_addr(rp), .rd_data(out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; next_idx <= '0; stored <= '0; pending <= '0;
      active <= 1'b0; late <= 1'b0; rd_idx <= '0; first_q <= 1'b0;
      out_valid <= 1'b0; out_first <= 1'b0; out_idx <= '0;
    end else if (clear) begin
      wp <= '0; stored <= '0; pending <= '0;
      active <= 1'b0; late <= 1'b0; first_q <= 1'b0;
      out_valid <= 1'b0; out_first <= 1'b0;
    end else begin
      // write side
      if (in_valid) begin
        wp       <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
        next_idx <= in_idx + 1'b1;
        if (stored != CW'(DEPTH)) stored <= stored + 1'b1;
      end
      // read side
      out_valid <= rd_en;
      out_first <= rd_en && first_q;
      if (rd_en) begin
        out_idx <= rd_idx;
        rd_idx  <= rd_idx + 1'b1;
        rp      <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
        first_q <= 1'b0;
      end
      if (start && !active) begin
        if (span <= IDXW'(stored) && span < IDXW'(DEPTH)) begin
          active  <= 1'b1;
          rp      <= start_rp;
          rd_idx  <= boundary_idx;
          pending <= span[CW-1:0] + CW'(in_valid);
          first_q <= 1'b1;
        end else
          late <= 1'b1;
      end else
        pending <= pending + CW'(in_valid && active) - CW'(rd_en);
    end
  end
endmodule
