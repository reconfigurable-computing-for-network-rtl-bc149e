// frame_hdr_capture: watches an AXI4-stream of frames and captures the
// first HDR_BYTES bytes and the length of each.
//
// The stream itself is not touched: this block only observes the beats
// that are transferred (valid and ready both high). When the last beat of
// a frame is transferred, done is high for the next cycle, with hdr and
// len describing the frame just finished; bytes beyond the frame's end read
// as zero. tkeep is assumed contiguous from byte 0. This is a helper of the
// parser functions.
module frame_hdr_capture
  import noc_pkg::*;
  import vnf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  axis_beat_t  beat,
  input  logic        xfer,
  output logic        done,
  output hdr_t        hdr,
  output logic [15:0] len
);
  localparam int unsigned HDR_BEATS = (HDR_BYTES + KEEP_W - 1) / KEEP_W;

  logic        mid;       // inside a frame
  logic [15:0] beat_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mid      <= 1'b0;
      beat_idx <= '0;
      done     <= 1'b0;
      hdr      <= '0;
      len      <= '0;
    end else begin
      done <= 1'b0;
      if (xfer) begin
        logic [15:0] idx;
        idx = mid ? beat_idx : 16'd0;
        if (!mid) begin
          hdr <= '0;
          len <= 16'(keep_bytes(beat.tkeep));
        end else begin
          len <= len + 16'(keep_bytes(beat.tkeep));
        end
        for (int b = 0; b < KEEP_W; b++)
          if (idx < 16'(HDR_BEATS) && int'(idx)*KEEP_W + b < HDR_BYTES)
            hdr[int'(idx)*KEEP_W + b] <= beat.tkeep[b] ? beat_byte(beat.tdata, b) : 8'h00;
        beat_idx <= idx + 1'b1;
        mid      <= !beat.tlast;
        done     <= beat.tlast;
      end
    end
  end
endmodule
