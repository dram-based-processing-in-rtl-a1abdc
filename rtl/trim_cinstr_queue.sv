// trim_cinstr_queue: first-in first-out queue for C-instrs, used in the NPR (on
// the buffer chip) and in every IPR. Synchronous push and pop, head visible while
// not empty, registered pointers; push into a full queue and pop from an empty one
// are ignored (and flagged by an assertion). Depth is a power of two.
module trim_cinstr_queue #(
  parameter int unsigned W     = 85,
  parameter int unsigned DEPTH = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push_i,
  input  logic [W-1:0] din_i,
  input  logic         pop_i,
  output logic [W-1:0] dout_o,
  output logic         empty_o,
  output logic         full_o,
  output logic [$clog2(DEPTH):0] count_o
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW:0]   wp, rp;

  assign count_o = wp - rp;
  assign empty_o = (wp == rp);
  assign full_o  = (count_o == (AW+1)'(DEPTH));
  assign dout_o  = mem[rp[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (push_i && !full_o) wp <= wp + 1'b1;
      if (pop_i && !empty_o) rp <= rp + 1'b1;
    end
  end
  always_ff @(posedge clk) if (push_i && !full_o) mem[wp[AW-1:0]] <= din_i;

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push_i && full_o));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop_i && empty_o));

endmodule
