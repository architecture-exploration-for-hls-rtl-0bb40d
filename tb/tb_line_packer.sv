// tb_line_packer: drives random records (0..G words of a random line) into the
// line packer and checks every emitted line, and the cycle it appears in,
// against a word-queue model: a line must be presented exactly one cycle
// after the record that completes it, holding the next G queued words in
// order (word 0 least significant). Runs G = 4 (default) and G = 2.
module tb_line_packer;
  logic clk = 0, rst_n = 0, clear = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ G = 4
  localparam int TW = 128;
  localparam int G4 = 4, W4 = TW / G4;
  logic [2:0]    nw4;
  logic [TW-1:0] line4, pk4;
  logic          full4;
  line_packer #(.G(G4), .TRACE_W(TW)) dut4 (
    .clk, .rst_n, .clear, .num_words(nw4), .trace_data(line4),
    .lp_full(full4), .packed_data(pk4));

  // ------------------------------------------------------------ G = 2
  localparam int G2 = 2, W2 = TW / G2;
  logic [1:0]    nw2;
  logic [TW-1:0] line2, pk2;
  logic          full2;
  line_packer #(.G(G2), .TRACE_W(TW)) dut2 (
    .clk, .rst_n, .clear, .num_words(nw2), .trace_data(line2),
    .lp_full(full2), .packed_data(pk2));

  logic [W4-1:0] q4[$];
  logic [W2-1:0] q2[$];
  int lines4 = 0, lines2 = 0, spills4 = 0, words4 = 0;

  function automatic logic [TW-1:0] rnd_line();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    nw4 = 0; nw2 = 0; line4 = '0; line2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      // ---- check what the last edge produced
      checks++;
      if (full4 !== (q4.size() >= G4)) begin
        failures++;
        $display("FAIL G=4 lp_full=%0b with %0d queued words, cycle %0d", full4, q4.size(), cyc);
      end
      if (full4 && q4.size() >= G4) begin
        logic [TW-1:0] exp;
        for (int i = 0; i < G4; i++) exp[i*W4 +: W4] = q4.pop_front();
        checks++; lines4++;
        if (pk4 !== exp) begin
          failures++;
          $display("FAIL G=4 line %0d: got %h expected %h", lines4, pk4, exp);
        end
      end
      checks++;
      if (full2 !== (q2.size() >= G2)) begin
        failures++;
        $display("FAIL G=2 lp_full=%0b with %0d queued words, cycle %0d", full2, q2.size(), cyc);
      end
      if (full2 && q2.size() >= G2) begin
        logic [TW-1:0] exp;
        for (int i = 0; i < G2; i++) exp[i*W2 +: W2] = q2.pop_front();
        checks++; lines2++;
        if (pk2 !== exp) begin
          failures++;
          $display("FAIL G=2 line %0d: got %h expected %h", lines2, pk2, exp);
        end
      end
      // ---- drive the next record
      nw4 = 3'($urandom_range(0, G4));
      nw2 = 2'($urandom_range(0, G2));
      line4 = rnd_line();
      line2 = rnd_line();
      if ((q4.size() % G4) + nw4 > G4) spills4++;
      for (int k = 0; k < nw4; k++) q4.push_back(line4[k*W4 +: W4]);
      for (int k = 0; k < nw2; k++) q2.push_back(line2[k*W2 +: W2]);
      words4 += nw4;
    end
    @(negedge clk);
    checks++;
    if (lines4 < 1000 || spills4 < 100) begin
      failures++;
      $display("FAIL too little activity: %0d lines, %0d spills", lines4, spills4);
    end
    $display("G=4: %0d words, %0d lines, %0d records spilled into overflow; G=2: %0d lines",
             words4, lines4, spills4, lines2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
