// tb_trace_window: trace-window experiment across overlay variants.
//
// The architecture evaluation compares how many user-circuit cycles fit in
// the trace buffer (the trace window) for Variant A and for Variant B with
// packer granularity G = 2, 4, 8 and 16, when 100 %, 50 %, 25 % or 10 % of
// the user variables are selected for tracing. This bench repeats that
// experiment on the synthetic user circuit of the end-to-end bench (fourteen
// 16-bit variables, the default schedule, 1024-line buffer): five overlays
// watch the same run; for each fraction the host writes each overlay's config
// RAM, starts tracing and the bench counts the cycles until each buffer has
// filled once.
//
// Variable selection: the first ceil(pct * 14 / 100) variables of a fixed
// order are selected. A state must keep the low words of its line up to the
// highest slot holding a selected variable, and its ctrl slot whenever it
// keeps anything; Variant A keeps the whole line of any such state.
//
// Checks (the trends of the evaluation): for every fraction the window does
// not shrink as G grows and Variant A is not longer than G = 2; for every G
// the window does not shrink as the fraction falls; and at G = 16 and 10 % it
// is longer than Variant A's. The measured windows are printed as a table.
module tb_trace_window;
  import hlsd_pkg::*;

  localparam int NV = 5;                        // overlays
  localparam int GS [NV] = '{0, 2, 4, 8, 16};
  localparam int NP = 4;
  localparam int PCT [NP] = '{100, 50, 25, 10};
  localparam int NS = 256, NSIG = 16, SW = 16, NSL = 8, TW = SW * NSL, DEPTH = 1024;
  // fixed selection order of the variables r1..r12, mem_lo, mem_hi
  localparam int ORDER [14] = '{9, 3, 0, 12, 13, 5, 2, 11, 8, 4, 7, 1, 6, 10};

  logic clk = 0, rst_n = 0;
  logic [1:0]  current_func;
  logic [7:0]  recode_state_in [4];
  logic [15:0] user_sig [NSIG];
  host_req_t   host_req [NV];
  logic [31:0] host_rdata [NV];
  logic        host_rvalid [NV], frozen [NV];
  logic        wrapped [NV];

  for (genvar v = 0; v < NV; v++) begin : g_ov
    hlsd_overlay_top #(.G(GS[v]), .DEPTH(DEPTH)) dut (
      .clk, .rst_n, .current_func, .recode_state_in, .user_sig,
      .host_req(host_req[v]), .host_rdata(host_rdata[v]), .host_rvalid(host_rvalid[v]),
      .frozen(frozen[v]));
    assign wrapped[v] = dut.u_tbuf.wrapped;
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // The same write to every overlay.
  task automatic hwrite(logic [15:0] a, logic [31:0] d);
    foreach (host_req[v]) host_req[v] = '{we: 1'b1, re: 1'b0, addr: a, wdata: d};
    @(negedge clk);
    foreach (host_req[v]) host_req[v] = '0;
  endtask

  // Number of low slots state s must keep for a selection (0: none).
  function automatic int keep_slots(int s, bit sel [NSIG]);
    int top_slot;
    top_slot = -1;
    for (int k = 0; k < NSL; k++) begin
      int src;
      src = sched_src(s, k);
      if (src >= 0 && sel[src]) top_slot = k;
    end
    if (top_slot < 0) return 0;
    return top_slot + 1;           // slots 0..top_slot, ctrl (slot 0) included
  endfunction

  int window [NP][NV];

  initial begin
    bit sel [NSIG];
    foreach (host_req[v]) host_req[v] = '0;
    current_func = 0;
    foreach (recode_state_in[i]) recode_state_in[i] = 8'(64 * i);
    foreach (user_sig[i]) user_sig[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NP; p++) begin
      int nsel, start;
      bit done [NV];
      nsel = (PCT[p] * 14 + 99) / 100;
      foreach (sel[i]) sel[i] = 0;
      for (int i = 0; i < nsel; i++) sel[ORDER[i]] = 1;
      // personalise: clear, then one config entry per state, each overlay
      // receiving the value for its own variant in the same cycle
      hwrite(16'h0000, 32'h2);
      for (int s = 0; s < NS; s++) begin
        int slots;
        slots = keep_slots(s, sel);
        for (int v = 0; v < NV; v++) begin
          int val;
          if (GS[v] == 0) val = (slots > 0) ? 1 : 0;
          else            val = (slots * SW + TW / GS[v] - 1) / (TW / GS[v]);
          host_req[v] = '{we: 1'b1, re: 1'b0, addr: 16'h1000 + 16'(s), wdata: 32'(val)};
        end
        @(negedge clk);
        foreach (host_req[v]) host_req[v] = '0;
      end
      hwrite(16'h0000, 32'h1);
      start = 0;
      foreach (done[v]) done[v] = 0;
      while (1) begin
        bit all;
        if ($urandom_range(0, 3) == 0) current_func = 2'($urandom_range(0, 2));
        foreach (recode_state_in[i]) recode_state_in[i] = 8'(64 * i + $urandom_range(0, 63));
        foreach (user_sig[i]) user_sig[i] = 16'($urandom);
        @(negedge clk);
        start++;
        all = 1;
        for (int v = 0; v < NV; v++) begin
          if (wrapped[v] && !done[v]) begin done[v] = 1; window[p][v] = start; end
          all &= done[v];
        end
        if (all) break;
      end
      hwrite(16'h0000, 32'h0);
      current_func = 0;
      foreach (recode_state_in[i]) recode_state_in[i] = 8'(64 * i);
      repeat (4) @(negedge clk);
    end

    $display("trace window (cycles until %0d lines are filled)", DEPTH);
    $display("  pct   VarA    G=2    G=4    G=8   G=16");
    for (int p = 0; p < NP; p++)
      $display("  %3d %6d %6d %6d %6d %6d", PCT[p], window[p][0], window[p][1],
               window[p][2], window[p][3], window[p][4]);
    for (int p = 0; p < NP; p++) begin
      chk(window[p][0] <= window[p][1], $sformatf("%0d%%: Variant A not above G=2", PCT[p]));
      for (int v = 2; v < NV; v++)
        chk(window[p][v] + 20 >= window[p][v-1],
            $sformatf("%0d%%: window does not shrink from G=%0d to G=%0d", PCT[p], GS[v-1], GS[v]));
    end
    for (int v = 0; v < NV; v++)
      for (int p = 1; p < NP; p++)
        chk(window[p][v] + 20 >= window[p-1][v],
            $sformatf("G=%0d: window does not shrink from %0d%% to %0d%%", GS[v], PCT[p-1], PCT[p]));
    chk(window[NP-1][NV-1] > window[NP-1][0], "G=16 at 10% longer than Variant A");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
