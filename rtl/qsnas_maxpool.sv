// qsnas_maxpool: 2x2 max-pool unit of a processing engine.
//
// A 4-entry buffer (LUT-RAM on the FPGA) collects the four activations of a
// 2x2 patch, which arrive one at a time; in_first marks the first of them.
// When the fourth arrives, three compare-and-swap steps, one per clock, on
// the pairs (0,1), (1,2), (2,3) bubble the largest value into the last
// entry: this is the first pass of a bubble sort, which is all that is
// needed for the maximum.  out_valid rises three clocks after the fourth
// input, with the tag given along with that fourth input.  A new patch may
// start as soon as the sort has finished (inputs spaced at least 3 clocks
// apart keep it busy-free; the controller spaces them K*K*CG >= 3 apart).
module qsnas_maxpool #(
  parameter int Q     = 3,   // activation width (unsigned)
  parameter int TAG_W = 16   // width of the tag carried with the result
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_first,
  input  logic [Q-1:0]     in_val,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [Q-1:0]     out_val,
  output logic [TAG_W-1:0] out_tag
);

  logic [Q-1:0]     buf_q [4];
  logic [1:0]       wptr;     // next buffer entry to fill
  logic [1:0]       step;     // compare-and-swap step 0..2
  logic             sorting;
  logic [TAG_W-1:0] tag_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) buf_q[i] <= '0;
      wptr      <= '0;
      step      <= '0;
      sorting   <= 1'b0;
      tag_q     <= '0;
      out_valid <= 1'b0;
      out_val   <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        logic [1:0] idx;
        idx = in_first ? 2'd0 : wptr;
        buf_q[idx] <= in_val;
        wptr       <= idx + 2'd1;
        if (idx == 2'd3) begin
          sorting <= 1'b1;
          step    <= '0;
          tag_q   <= in_tag;
        end
      end
      if (sorting) begin
        if (buf_q[step] > buf_q[step + 2'd1]) begin
          buf_q[step]        <= buf_q[step + 2'd1];
          buf_q[step + 2'd1] <= buf_q[step];
        end
        if (step == 2'd2) begin
          sorting   <= 1'b0;
          out_valid <= 1'b1;
          out_val   <= (buf_q[2] > buf_q[3]) ? buf_q[2] : buf_q[3];
          out_tag   <= tag_q;
        end
        step <= step + 2'd1;
      end
    end
  end

endmodule
