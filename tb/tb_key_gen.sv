// tb_key_gen: three key generations at the full 1024-bit key size from random
// printable sequences; every 32-bit key word is compared with the reference
// derivation (class counts, row from J+K, hash H-(w mod 4 + 1)). Also checks
// that the gated clock of the hash datapath is silent while idle and runs
// while a key is being generated.
module tb_key_gen;
  import etacit_pkg::*;
  import etacit_ref_pkg::*;

  localparam int KB = 1024, L = 16, NW = KB / 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, busy, key_valid;
  logic [L-1:0][7:0] j_seq, k_seq;
  logic [KB-1:0] key;
  int checks = 0, failures = 0;
  int gated_edges = 0;

  key_gen #(.KEY_BITS(KB), .SEQ_LEN(L)) dut (.clk, .rst_n, .start, .j_seq, .k_seq,
                                             .busy, .key_valid, .key);

  always @(posedge dut.gclk) gated_edges++;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [7:0] jr[], kr[];
    int g0;
    jr = new[L]; kr = new[L];
    j_seq = '0; k_seq = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 3; n++) begin
      for (int i = 0; i < L; i++) begin
        jr[i] = 8'($urandom_range(33, 126));
        kr[i] = 8'($urandom_range(33, 126));
        j_seq[i] = jr[i];
        k_seq[i] = kr[i];
      end
      // idle: no gated clock edges
      g0 = gated_edges;
      repeat (20) @(posedge clk);
      checks++;
      if (gated_edges != g0) begin failures++; $display("FAIL gated clock runs while idle"); end
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      g0 = gated_edges;
      @(posedge clk);
      #1;
      checks++;
      if (key_valid) begin failures++; $display("FAIL key_valid not cleared by start"); end
      wait (key_valid);
      @(posedge clk);
      checks++;
      if (gated_edges - g0 < NW * 3) begin
        failures++; $display("FAIL gated clock did not run (%0d edges)", gated_edges - g0);
      end
      for (int w = 0; w < NW; w++) begin
        int unsigned e;
        e = ref_key_word(jr, kr, w);
        checks++;
        if (key[w*32 +: 32] !== e) begin
          failures++;
          $display("FAIL session %0d word %0d: got %h exp %h", n, w, key[w*32 +: 32], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
