// Channel queue: a synchronous first-in first-out buffer of DEPTH words.
//
// The word at the head is visible on rd_data while empty is low; pop removes it. A push
// and a pop in the same cycle are both performed. A push into a full queue is refused;
// the writer sees full and holds its word (the NI checks separately that credits keep its
// receive queues from overflowing). The original description draws the queues of the NI but says nothing of their
// construction; a register array with read and write pointers is this design's choice.
module dael_fifo #(
  parameter int W     = 32,
  parameter int DEPTH = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   push,
  input  logic [W-1:0]           wr_data,
  input  logic                   pop,
  output logic [W-1:0]           rd_data,
  output logic                   empty,
  output logic                   full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rp_q, wp_q;
  localparam int CW = $clog2(DEPTH+1);
  logic [CW-1:0] cnt_q;

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) if (do_push) mem[wp_q] <= wr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp_q  <= '0;
      wp_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_push) wp_q <= inc(wp_q);
      if (do_pop)  rp_q <= inc(rp_q);
      cnt_q <= cnt_q + CW'(do_push) - CW'(do_pop);
    end
  end

  assign rd_data = mem[rp_q];
  assign empty   = (cnt_q == 0);
  assign full    = (int'(cnt_q) == DEPTH);
  assign count   = cnt_q;
endmodule
