// tb_etacit_encryptor: encrypts three 128-character (1024-bit) blocks with
// random keys and sequences and compares every cipher character with the
// reference E-TACIT steps (shuffle, XOR key, TACIT term, XOR J, bit reverse).
// Block 0 runs at full rate and checks the timing: one character accepted per
// cycle while loading, first cipher 3 cycles after the last accepted
// character, then one per cycle. Blocks 1 and 2 use random input gaps and
// random output back-pressure (stalls).
module tb_etacit_encryptor;
  import etacit_pkg::*;
  import etacit_ref_pkg::*;

  localparam int N = 128, KB = 1024, L = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [KB-1:0] key;
  logic [L-1:0][7:0] j_seq;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0, out_last;
  byte_t in_data = '0, out_data;
  int checks = 0, failures = 0, stalls = 0;
  bit [7:0] pt [N];
  bit throttle = 1'b0;
  int cyc = 0;

  etacit_encryptor #(.N_CHARS(N), .KEY_BITS(KB), .SEQ_LEN(L)) dut (
    .clk, .rst_n, .key, .j_seq, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data, .out_last);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output side: ready driven at the falling edge, random when throttled
  always @(negedge clk) begin
    out_ready <= throttle ? 1'($urandom_range(0, 2) != 0) : 1'b1;
  end

  initial begin
    int t_last_in, t_first_out, nout;
    for (int i = 0; i < KB / 32; i++) key[i*32 +: 32] = $urandom;
    for (int i = 0; i < L; i++) j_seq[i] = 8'($urandom_range(33, 126));
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int blk = 0; blk < 3; blk++) begin
      throttle = (blk != 0);
      if (blk == 2) key[31:0] = $urandom;   // new shuffle mask
      for (int i = 0; i < N; i++) pt[i] = 8'($urandom_range(32, 126));
      // load: a character is taken at the rising edge after a falling edge
      // that saw in_valid and in_ready both high
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_data  = pt[i];
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(posedge clk);
        t_last_in = cyc;
        if (blk != 0) begin
          @(negedge clk);
          in_valid = 1'b0;
          repeat ($urandom_range(0, 2)) @(negedge clk);
        end
      end
      @(negedge clk);
      in_valid = 1'b0;
      // collect
      nout = 0;
      t_first_out = -1;
      while (nout < N) begin
        #2;
        if (out_valid && out_ready) begin
          bit [7:0] e;
          logic [6:0] src;
          src = 7'(nout) ^ key[6:0];
          e = ref_enc(pt[src], key[(nout % (KB/8))*8 +: 8], j_seq[nout % L]);
          if (t_first_out < 0) t_first_out = cyc;
          checks++;
          if (out_data !== e || out_last !== (nout == N - 1)) begin
            failures++;
            $display("FAIL blk %0d char %0d: got %h/%0d exp %h", blk, nout, out_data, out_last, e);
          end
          nout++;
        end else if (out_valid) stalls++;
        @(negedge clk);
      end
      if (blk == 0) begin
        checks++;
        // edge of the last input transfer -> edge of the first output transfer:
        // output valid after 3 edges, taken at the 4th
        if (t_first_out - t_last_in != 4) begin
          failures++;
          $display("FAIL first cipher %0d cycles after last input", t_first_out - t_last_in);
        end
        checks++;
        // one character per cycle: N transfer edges (cyc has advanced once more)
        if (cyc - t_first_out != N) begin
          failures++;
          $display("FAIL block output took %0d cycles", cyc - t_first_out);
        end
      end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no output stall exercised"); end
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;
endmodule
