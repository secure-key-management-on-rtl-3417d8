// fsl_fifo: one channel of a Fast Simplex Link, a dual-clock
// first-word-fall-through FIFO between a writer and a reader.
//
// The coprocessor-dedicated bus lets the processor and the security module run
// in two clock domains separated by FIFOs, so the processor clock is not held
// back by the cipher's critical path. A channel is a FIFO of DEPTH words of
// WIDTH bits (the FSL word is 32 data bits plus one control bit). Write and
// read pointers cross between domains as Gray codes through two-flop
// synchronisers; `full` and `exists` are registered in their own domain and
// are conservative (a word written becomes visible to the reader three read
// clocks later, and space freed by a read is seen by the writer three write
// clocks later). The head word is on rd_data whenever `exists` is high;
// rd_en pops it. wr_en pushes wr_data unless `full`. DEPTH must be a power of
// two. rst_n resets both sides asynchronously and must be released while
// neither side is writing or reading. The Gray-pointer structure and depth 16
// are this design's choices; the source only says FIFOs separate the domains.
module fsl_fifo #(
  parameter int unsigned WIDTH = 33,
  parameter int unsigned DEPTH = 16
) (
  input  logic             rst_n,
  // write side
  input  logic             wr_clk,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  // read side
  input  logic             rd_clk,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             exists
);

  localparam int unsigned AW = $clog2(DEPTH);

  typedef logic [AW:0] ptr_t;

  function automatic ptr_t bin2gray(input ptr_t b);
    return b ^ (b >> 1);
  endfunction

  logic [WIDTH-1:0] mem [DEPTH];

  // write domain
  ptr_t wbin_q, wgray_q, rgray_w1_q, rgray_w2_q, wbin_next, wgray_next;
  logic do_wr, full_q;
  // read domain
  ptr_t rbin_q, rgray_q, wgray_r1_q, wgray_r2_q, rbin_next, rgray_next;
  logic do_rd, empty_q;

  assign do_wr      = wr_en && !full_q;
  assign wbin_next  = wbin_q + ptr_t'(do_wr);
  assign wgray_next = bin2gray(wbin_next);

  always_ff @(posedge wr_clk) begin
    if (do_wr) mem[wbin_q[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge rst_n) begin
    if (!rst_n) begin
      wbin_q     <= '0;
      wgray_q    <= '0;
      rgray_w1_q <= '0;
      rgray_w2_q <= '0;
      full_q     <= 1'b0;
    end else begin
      wbin_q     <= wbin_next;
      wgray_q    <= wgray_next;
      rgray_w1_q <= rgray_q;
      rgray_w2_q <= rgray_w1_q;
      // full: write pointer one lap ahead of the synchronised read pointer
      full_q     <= (wgray_next == {~rgray_w2_q[AW:AW-1], rgray_w2_q[AW-2:0]});
    end
  end

  assign do_rd      = rd_en && !empty_q;
  assign rbin_next  = rbin_q + ptr_t'(do_rd);
  assign rgray_next = bin2gray(rbin_next);

  always_ff @(posedge rd_clk or negedge rst_n) begin
    if (!rst_n) begin
      rbin_q     <= '0;
      rgray_q    <= '0;
      wgray_r1_q <= '0;
      wgray_r2_q <= '0;
      empty_q    <= 1'b1;
    end else begin
      rbin_q     <= rbin_next;
      rgray_q    <= rgray_next;
      wgray_r1_q <= wgray_q;
      wgray_r2_q <= wgray_r1_q;
      empty_q    <= (rgray_next == wgray_r2_q);
    end
  end

  assign full    = full_q;
  assign exists  = !empty_q;
  assign rd_data = mem[rbin_q[AW-1:0]];

  initial assert (DEPTH >= 4 && (1 << AW) == DEPTH) else $error("DEPTH must be a power of two >= 4");

  a_no_overflow:  assert property (@(posedge wr_clk) disable iff (!rst_n) wr_en |-> !full);
  a_no_underflow: assert property (@(posedge rd_clk) disable iff (!rst_n) rd_en |-> exists);

endmodule
