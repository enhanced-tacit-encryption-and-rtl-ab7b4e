// etacit_ref_pkg: reference models used by the testbenches, written from the
// description of the E-TACIT scheme and independent of the RTL: the four hash
// functions, the class counts and key derivation, the LFSR character
// generator, and the per-character cipher steps.
package etacit_ref_pkg;

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

  function automatic bit r_lower(input bit [7:0] c); return c inside {[8'h61:8'h7a]}; endfunction
  function automatic bit r_digit(input bit [7:0] c); return c inside {[8'h30:8'h39]}; endfunction
  function automatic bit r_upper(input bit [7:0] c); return c inside {[8'h41:8'h5a]}; endfunction

  // key word w of a key derived from sequences j and k (L characters each)
  function automatic int unsigned ref_key_word(input bit [7:0] j[], input bit [7:0] k[],
                                               input int w);
    int unsigned S = 0, T = 0, U = 0, V = 0, lat;
    int L = j.size();
    for (int i = 0; i < L; i++) begin
      if (r_lower(j[i])) S++; else if (r_digit(j[i])) T++; else if (r_upper(j[i])) U++; else V++;
      if (r_lower(k[i])) S++; else if (r_digit(k[i])) T++; else if (r_upper(k[i])) U++; else V++;
    end
    return ref_hash(w % 4, (int'(j[w % L]) + int'(k[w % L])) % 10, S, T, U, V, lat);
  endfunction

  // x^x mod 256 by plain repeated multiplication
  function automatic bit [7:0] ref_selfpow(input bit [7:0] x);
    int unsigned r = 1;
    for (int i = 0; i < int'(x); i++) r = (r * x) % 256;
    return 8'(r);
  endfunction

  function automatic bit [7:0] ref_rev(input bit [7:0] x);
    return {x[0], x[1], x[2], x[3], x[4], x[5], x[6], x[7]};
  endfunction

  // cipher of character c with key byte kb and sequence byte jb
  function automatic bit [7:0] ref_enc(input bit [7:0] c, input bit [7:0] kb, input bit [7:0] jb);
    return ref_rev(((c ^ kb) ^ ref_selfpow(kb)) ^ jb);
  endfunction

  // LFSR sequence model: 16-bit Fibonacci, taps 16,14,13,11, 8 steps per char
  function automatic bit [7:0] ref_next_char(inout bit [15:0] st);
    for (int i = 0; i < 8; i++) st = {st[14:0], st[15] ^ st[13] ^ st[12] ^ st[10]};
    return 8'h21 + 8'(int'(st[7:0]) % 94);
  endfunction

endpackage
