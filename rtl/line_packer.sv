// line_packer: packs variable-length trace records into full buffer lines.
//
// The trace line of a state usually fills only its low part. The line is cut
// into G words of WORD_W = TRACE_W/G bits (w0 = least significant), and the
// config RAM tells, per state, how many low words are worth keeping
// (num_words, 0..G). The packer appends those words to a line register
// f0..f(G-1) at the current fill position. Words that do not fit spill into
// an overflow register f(G)..f(2G-2) (at most G-1 words can spill). When the
// line register is full it is presented to the trace buffer for one cycle
// (lp_full); in the same cycle the overflow words move down to f0.. and the
// new words are appended after them. A larger G packs more finely and costs
// wider multiplexers: word position i selects among w0..wi and, for i<G-1,
// the overflow word f(i+G).
//
// Interface: one record per clock (num_words = 0 means none). lp_full and
// packed_data are registered: a line completed by the record of cycle t is
// presented in cycle t+1. clear empties the packer; a partly filled line is
// not flushed (it is lost at clear), which is this design's choice.
// A num_words above G is treated as G.
//
// The word split, the f/overflow register structure and the multiplexer
// inputs follow the architecture description; the fill bookkeeping (a single
// count of held words) is this design's own.
module line_packer
  import hlsd_pkg::*;
#(
  parameter int unsigned G       = G_D,
  parameter int unsigned TRACE_W = TRACE_W_D,
  localparam int unsigned WORD_W = TRACE_W / G,
  localparam int unsigned CFG_W  = $clog2(G + 1),
  localparam int unsigned NF     = 2 * G - 1,        // f0 .. f(2G-2)
  localparam int unsigned CNT_W  = $clog2(2 * G)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic [CFG_W-1:0]   num_words,
  input  logic [TRACE_W-1:0] trace_data,
  output logic               lp_full,
  output logic [TRACE_W-1:0] packed_data
);

  logic [WORD_W-1:0] f     [NF];
  logic [WORD_W-1:0] f_nxt [NF];
  logic [CNT_W-1:0]  cnt, cnt_nxt;       // words held in f

  always_comb begin
    logic [WORD_W-1:0] base [NF];
    logic [CNT_W-1:0]  bcnt;
    logic [CNT_W-1:0]  n;

    n = (num_words > CFG_W'(G)) ? CNT_W'(G) : CNT_W'(num_words);

    // Start from the line register, or from the overflow if the line
    // register was handed to the trace buffer this cycle.
    for (int i = 0; i < int'(NF); i++) base[i] = f[i];
    bcnt = cnt;
    if (cnt >= CNT_W'(G)) begin
      for (int i = 0; i < int'(NF); i++)
        base[i] = (i + int'(G) < int'(NF)) ? f[i + int'(G)] : '0;
      bcnt = cnt - CNT_W'(G);
    end

    // Append the new words at the fill position.
    for (int i = 0; i < int'(NF); i++) f_nxt[i] = base[i];
    for (int k = 0; k < int'(G); k++)
      if (CNT_W'(k) < n) f_nxt[int'(bcnt) + k] = trace_data[k*WORD_W +: WORD_W];
    cnt_nxt = bcnt + n;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < int'(NF); i++) f[i] <= '0;
    end else if (clear) begin
      cnt <= '0;
    end else begin
      cnt <= cnt_nxt;
      for (int i = 0; i < int'(NF); i++) f[i] <= f_nxt[i];
    end
  end

  assign lp_full = (cnt >= CNT_W'(G));
  for (genvar i = 0; i < G; i++) begin : g_out
    assign packed_data[i*WORD_W +: WORD_W] = f[i];
  end

  // The fill count can never exceed what the registers hold.
  a_cnt_range: assert property (@(posedge clk) cnt <= CNT_W'(NF))
    else $error("line_packer: fill count out of range");

endmodule
