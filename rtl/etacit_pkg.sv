// etacit_pkg: types, constants and pure functions shared by the E-TACIT cipher
// and the 3-D network-on-chip.
//
// Contents:
//  * byte_t, the 8-bit character that the cipher works on (one ASCII code).
//  * The flit format of the network: a 2-bit type (HEAD, BODY, TAIL), a
//    2-bit virtual-channel number (up to 4 VCs per link) and an 8-bit payload. A HEAD flit carries the destination coordinates
//    {z[1:0], y[1:0], x[1:0]} in its payload; BODY and TAIL flits carry one
//    cipher character each. The flit format is this design's own choice.
//  * Port numbering of the 7-port 3-D router (local, east, west, north, south,
//    up, down).
//  * The four hash functions H-1..H-4 of the key generator, as a table of
//    terms: every row is either  base^exp (+|-) q  or  a*b*c (+|-) q, all in
//    HASH_W-bit wrap-around arithmetic. The rows follow the published tables
//    of the E-TACIT scheme; s, t, u, v are the counts of lower-case letters,
//    digits, upper-case letters and special characters.
//  * self_pow(k) = k^k mod 256, the key term of the TACIT logic step, and
//    bit_rev8, the bit-reverse step.
package etacit_pkg;

  typedef logic [7:0] byte_t;

  localparam int unsigned HASH_W = 32;
  typedef logic [HASH_W-1:0] hword_t;

  // ---------------------------------------------------------------- flits
  typedef enum logic [1:0] {
    FT_IDLE = 2'd0,
    FT_HEAD = 2'd1,
    FT_BODY = 2'd2,
    FT_TAIL = 2'd3
  } flit_type_t;

  localparam int unsigned VC_W = 2;

  typedef struct packed {
    flit_type_t      ftype;
    logic [VC_W-1:0] vc;     // virtual channel of the link the flit is on
    byte_t           data;
  } flit_t;


  // destination field of a HEAD flit
  function automatic byte_t head_dest(input int unsigned x, input int unsigned y,
                                      input int unsigned z);
    return byte_t'({2'b00, 2'(z), 2'(y), 2'(x)});
  endfunction

  // ---------------------------------------------------------------- router
  localparam int unsigned NPORTS = 7;
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_EAST  = 3'd1,   // +x
    P_WEST  = 3'd2,   // -x
    P_NORTH = 3'd3,   // +y
    P_SOUTH = 3'd4,   // -y
    P_UP    = 3'd5,   // +z (vertical TSV link)
    P_DOWN  = 3'd6    // -z (vertical TSV link)
  } port_t;

  // ---------------------------------------------------------------- cipher
  function automatic byte_t bit_rev8(input byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++) r[i] = b[7-i];
    return r;
  endfunction

  // k^k mod 256 by square-and-multiply over the 8 exponent bits
  function automatic byte_t self_pow(input byte_t k);
    byte_t r, b;
    r = 8'd1;
    b = k;
    for (int i = 0; i < 8; i++) begin
      if (k[i]) r = r * b;
      b = b * b;
    end
    return r;
  endfunction

  // character classes of the key generation scheme
  function automatic logic is_lower(input byte_t c);
    return (c >= 8'h61) && (c <= 8'h7a);
  endfunction
  function automatic logic is_digit(input byte_t c);
    return (c >= 8'h30) && (c <= 8'h39);
  endfunction
  function automatic logic is_upper(input byte_t c);
    return (c >= 8'h41) && (c <= 8'h5a);
  endfunction

  // ---------------------------------------------------------------- hashes
  typedef struct packed {
    logic   use_prod;  // 1: first term is prod, 0: first term is base^expo
    hword_t base;
    byte_t  expo;
    hword_t prod;
    logic   sub;       // 1: first term - q, 0: first term + q
    hword_t q;
  } hterm_t;

  // f = 0..3 selects H-1..H-4, row = 0..9 the table row (t column).
  // Rows above 9 are folded back by subtracting 10.
  function automatic hterm_t hash_terms(input logic [1:0] f, input logic [3:0] row_in,
                                        input byte_t s8, input byte_t t8,
                                        input byte_t u8, input byte_t v8);
    hterm_t h;
    hword_t s, t, u, v;
    logic [3:0] row;
    row = (row_in > 4'd9) ? row_in - 4'd10 : row_in;
    s = hword_t'(s8);
    t = hword_t'(t8);
    u = hword_t'(u8);
    v = hword_t'(v8);
    h = '0;
    unique case (f)
      2'd0: unique case (row)   // H-1: s_g = s > (t, u, v)
        4'd0: begin h.base = s; h.expo = t8; h.sub = 1'b1; h.q = s * t; end
        4'd1: begin h.base = s; h.expo = u8; h.sub = 1'b0; h.q = s + u; end
        4'd2: begin h.base = s; h.expo = v8; h.sub = 1'b1; h.q = u + v; end
        4'd3: begin h.base = t; h.expo = u8; h.sub = 1'b0; h.q = v * s; end
        4'd4: begin h.base = t; h.expo = v8; h.sub = 1'b0; h.q = t * s; end
        4'd5: begin h.base = t; h.expo = s8; h.sub = 1'b1; h.q = s; end
        4'd6: begin h.base = u; h.expo = s8; h.sub = 1'b1; h.q = s; end
        4'd7: begin h.base = u; h.expo = t8; h.sub = 1'b0; h.q = t + s - u; end
        4'd8: begin h.base = u; h.expo = v8; h.sub = 1'b0; h.q = t + s + v - u; end
        default: begin h.use_prod = 1'b1; h.prod = s * t * v; h.sub = 1'b0; h.q = s * u; end
      endcase
      2'd1: unique case (row)   // H-2: t_g = t > (s, u, v)
        4'd0: begin h.base = t; h.expo = u8; h.sub = 1'b1; h.q = t * u; end
        4'd1: begin h.base = t; h.expo = v8; h.sub = 1'b0; h.q = t + u; end
        4'd2: begin h.base = t; h.expo = s8; h.sub = 1'b1; h.q = v + s; end
        4'd3: begin h.base = u; h.expo = v8; h.sub = 1'b0; h.q = s * t; end
        4'd4: begin h.base = u; h.expo = s8; h.sub = 1'b0; h.q = u * t; end
        4'd5: begin h.base = u; h.expo = t8; h.sub = 1'b1; h.q = t; end
        4'd6: begin h.base = v; h.expo = t8; h.sub = 1'b1; h.q = u; end
        4'd7: begin h.base = v; h.expo = u8; h.sub = 1'b0; h.q = u + t - v; end
        4'd8: begin h.base = v; h.expo = s8; h.sub = 1'b0; h.q = u + t + s - v; end
        default: begin h.use_prod = 1'b1; h.prod = t * u * s; h.sub = 1'b0; h.q = t * v; end
      endcase
      2'd2: unique case (row)   // H-3: u_g = u > (s, t, v)
        4'd0: begin h.base = u; h.expo = v8; h.sub = 1'b1; h.q = u * v; end
        4'd1: begin h.base = u; h.expo = s8; h.sub = 1'b0; h.q = u + s; end
        4'd2: begin h.base = u; h.expo = t8; h.sub = 1'b1; h.q = s + t; end
        4'd3: begin h.base = v; h.expo = s8; h.sub = 1'b0; h.q = t * u; end
        4'd4: begin h.base = v; h.expo = t8; h.sub = 1'b0; h.q = v * u; end
        4'd5: begin h.base = v; h.expo = u8; h.sub = 1'b1; h.q = u; end
        4'd6: begin h.base = s; h.expo = u8; h.sub = 1'b1; h.q = u; end
        4'd7: begin h.base = s; h.expo = v8; h.sub = 1'b0; h.q = v + u - s; end
        4'd8: begin h.base = s; h.expo = t8; h.sub = 1'b0; h.q = v + u + t - s; end
        default: begin h.use_prod = 1'b1; h.prod = u * v * t; h.sub = 1'b0; h.q = u * s; end
      endcase
      default: unique case (row) // H-4: v_g = v > (s, t, u)
        4'd0: begin h.base = v; h.expo = s8; h.sub = 1'b1; h.q = v * s; end
        4'd1: begin h.base = v; h.expo = t8; h.sub = 1'b0; h.q = v + t; end
        4'd2: begin h.base = v; h.expo = u8; h.sub = 1'b1; h.q = t + u; end
        4'd3: begin h.base = s; h.expo = t8; h.sub = 1'b0; h.q = u * v; end
        4'd4: begin h.base = s; h.expo = u8; h.sub = 1'b0; h.q = s * v; end
        4'd5: begin h.base = s; h.expo = v8; h.sub = 1'b1; h.q = v; end
        4'd6: begin h.base = t; h.expo = v8; h.sub = 1'b1; h.q = v; end
        4'd7: begin h.base = t; h.expo = s8; h.sub = 1'b0; h.q = s + v - t; end
        4'd8: begin h.base = t; h.expo = u8; h.sub = 1'b0; h.q = s + v + u - t; end
        default: begin h.use_prod = 1'b1; h.prod = v * s * u; h.sub = 1'b0; h.q = v * t; end
      endcase
    endcase
    return h;
  endfunction

endpackage
