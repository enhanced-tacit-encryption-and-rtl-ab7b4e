// tb_hash_unit: checks every row of the four hash functions H-1..H-4 against
// a reference model written directly from the hash tables, for random
// character-class counts, and checks the latency (exp+3 cycles for a power
// row, 3 cycles for the triple-product row).
module tb_hash_unit;
  import etacit_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0;
  logic [1:0] func;
  logic [3:0] row;
  byte_t s, t, u, v;
  logic busy, done;
  hword_t result;
  int checks = 0, failures = 0;

  hash_unit dut (.clk, .rst_n, .start, .func, .row, .cnt_s(s), .cnt_t(t),
                 .cnt_u(u), .cnt_v(v), .busy, .done, .result);

  function automatic int unsigned pw(input int unsigned b, input int unsigned e);
    int unsigned r = 1;
    for (int unsigned i = 0; i < e; i++) r = r * b;
    return r;
  endfunction

  // returns {value, latency}
  function automatic int unsigned ref_hash(input int f, input int r,
      input int unsigned S, input int unsigned T, input int unsigned U,
      input int unsigned V, output int unsigned lat);
    int unsigned e;
    int unsigned res;
    case (f)
      0: case (r)
        0: begin res = pw(S,T) - S*T;           e = T; end
        1: begin res = pw(S,U) + (S+U);         e = U; end
        2: begin res = pw(S,V) - (U+V);         e = V; end
        3: begin res = pw(T,U) + V*S;           e = U; end
        4: begin res = pw(T,V) + T*S;           e = V; end
        5: begin res = pw(T,S) - S;             e = S; end
        6: begin res = pw(U,S) - S;             e = S; end
        7: begin res = pw(U,T) + (T+S-U);       e = T; end
        8: begin res = pw(U,V) + (T+S+V-U);     e = V; end
        default: begin res = S*T*V + S*U;       e = 0; end
      endcase
      1: case (r)
        0: begin res = pw(T,U) - T*U;           e = U; end
        1: begin res = pw(T,V) + (T+U);         e = V; end
        2: begin res = pw(T,S) - (V+S);         e = S; end
        3: begin res = pw(U,V) + S*T;           e = V; end
        4: begin res = pw(U,S) + U*T;           e = S; end
        5: begin res = pw(U,T) - T;             e = T; end
        6: begin res = pw(V,T) - U;             e = T; end
        7: begin res = pw(V,U) + (U+T-V);       e = U; end
        8: begin res = pw(V,S) + (U+T+S-V);     e = S; end
        default: begin res = T*U*S + T*V;       e = 0; end
      endcase
      2: case (r)
        0: begin res = pw(U,V) - U*V;           e = V; end
        1: begin res = pw(U,S) + (U+S);         e = S; end
        2: begin res = pw(U,T) - (S+T);         e = T; end
        3: begin res = pw(V,S) + T*U;           e = S; end
        4: begin res = pw(V,T) + V*U;           e = T; end
        5: begin res = pw(V,U) - U;             e = U; end
        6: begin res = pw(S,U) - U;             e = U; end
        7: begin res = pw(S,V) + (V+U-S);       e = V; end
        8: begin res = pw(S,T) + (V+U+T-S);     e = T; end
        default: begin res = U*V*T + U*S;       e = 0; end
      endcase
      default: case (r)
        0: begin res = pw(V,S) - V*S;           e = S; end
        1: begin res = pw(V,T) + (V+T);         e = T; end
        2: begin res = pw(V,U) - (T+U);         e = U; end
        3: begin res = pw(S,T) + U*V;           e = T; end
        4: begin res = pw(S,U) + S*V;           e = U; end
        5: begin res = pw(S,V) - V;             e = V; end
        6: begin res = pw(T,V) - V;             e = V; end
        7: begin res = pw(T,S) + (S+V-T);       e = S; end
        8: begin res = pw(T,U) + (S+V+U-T);     e = U; end
        default: begin res = V*S*U + V*T;       e = 0; end
      endcase
    endcase
    lat = (r == 9) ? 3 : e + 3;
    return res;
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp_val, exp_lat, cyc;
    func = '0; row = '0; s = '0; t = '0; u = '0; v = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int trial = 0; trial < 12; trial++) begin
      for (int f = 0; f < 4; f++) begin
        for (int r = 0; r < 10; r++) begin
          s <= byte_t'($urandom_range(0, 20));
          t <= byte_t'($urandom_range(0, 20));
          u <= byte_t'($urandom_range(0, 20));
          v <= byte_t'($urandom_range(0, 20));
          if (trial == 0) begin s <= 8'd3; t <= 8'd5; u <= 8'd7; v <= 8'd2; end
          func  <= 2'(f);
          row   <= 4'(r);
          start <= 1'b1;
          @(posedge clk);
          start <= 1'b0;
          exp_val = ref_hash(f, r, 32'(s), 32'(t), 32'(u), 32'(v), exp_lat);
          cyc = 0;
          do begin @(posedge clk); cyc++; end while (!done && cyc < 1000);
          checks++;
          if (result !== exp_val) begin
            failures++;
            $display("FAIL H-%0d row %0d s=%0d t=%0d u=%0d v=%0d: got %0d exp %0d",
                     f+1, r, s, t, u, v, result, exp_val);
          end
          checks++;
          if (cyc != exp_lat) begin
            failures++;
            $display("FAIL latency H-%0d row %0d: %0d cycles, expected %0d", f+1, r, cyc, exp_lat);
          end
        end
      end
    end
    // a row above 9 folds back: row 12 behaves as row 2
    s <= 8'd4; t <= 8'd3; u <= 8'd2; v <= 8'd5; func <= 2'd0; row <= 4'd12; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    exp_val = ref_hash(0, 2, 4, 3, 2, 5, exp_lat);
    do @(posedge clk); while (!done);
    checks++;
    if (result !== exp_val) begin failures++; $display("FAIL row fold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
