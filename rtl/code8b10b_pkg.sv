// code8b10b_pkg: the 8b/10b line code as pure functions.
//
// Each byte HGF_EDCBA is coded as a 6-bit sub-block (from EDCBA, the 5b/6b
// code) followed by a 4-bit sub-block (from HGF, the 3b/4b code). Each
// sub-block has one form for negative and, where it is unbalanced (or is
// one of the two neutral codes 111000 / 1100), the complement for positive
// running disparity. This gives DC balance, a disparity that never exceeds
// one symbol, and frequent transitions for clock recovery. Control symbols
// K28.y and K23.7, K27.7, K29.7, K30.7 are supported; K28.1, K28.5 and
// K28.7 hold a comma.
//
// Bit order: code[9] is bit 'a', code[0] is bit 'j'; bit 'a' is sent first.
// Running disparity is one bit: 0 = negative, 1 = positive.
// The tables are the standard Widmer-Franaszek code.
package code8b10b_pkg;

  typedef struct packed {
    logic [9:0] code;
    logic       rd;      // running disparity after this symbol
  } enc_res_t;

  typedef struct packed {
    logic [7:0] data;
    logic       k;
    logic       code_err; // not a valid symbol
    logic       disp_err; // valid symbol, wrong disparity
    logic       rd;
  } dec_res_t;

  // 5b/6b code (abcdei) for negative running disparity, indexed by EDCBA.
  function automatic logic [5:0] tbl6(input logic [4:0] x);
    case (x)
      5'd0:  return 6'b100111;  5'd1:  return 6'b011101;
      5'd2:  return 6'b101101;  5'd3:  return 6'b110001;
      5'd4:  return 6'b110101;  5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;  5'd7:  return 6'b111000;
      5'd8:  return 6'b111001;  5'd9:  return 6'b100101;
      5'd10: return 6'b010101;  5'd11: return 6'b110100;
      5'd12: return 6'b001101;  5'd13: return 6'b101100;
      5'd14: return 6'b011100;  5'd15: return 6'b010111;
      5'd16: return 6'b011011;  5'd17: return 6'b100011;
      5'd18: return 6'b010011;  5'd19: return 6'b110010;
      5'd20: return 6'b001011;  5'd21: return 6'b101010;
      5'd22: return 6'b011010;  5'd23: return 6'b111010;
      5'd24: return 6'b110011;  5'd25: return 6'b100110;
      5'd26: return 6'b010110;  5'd27: return 6'b110110;
      5'd28: return 6'b001110;  5'd29: return 6'b101110;
      5'd30: return 6'b011110;  default: return 6'b101011;
    endcase
  endfunction

  // 3b/4b data code (fghj) for negative disparity; 7 is the primary D.x.P7.
  function automatic logic [3:0] tbl4(input logic [2:0] y);
    case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b1001;
      3'd2: return 4'b0101;  3'd3: return 4'b1100;
      3'd4: return 4'b1101;  3'd5: return 4'b1010;
      3'd6: return 4'b0110;  default: return 4'b1110;
    endcase
  endfunction

  // 3b/4b code of K28.y for negative disparity (always complemented at RD+).
  function automatic logic [3:0] tbl4k(input logic [2:0] y);
    case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b0110;
      3'd2: return 4'b1010;  3'd3: return 4'b1100;
      3'd4: return 4'b1101;  3'd5: return 4'b0101;
      3'd6: return 4'b1001;  default: return 4'b0111;
    endcase
  endfunction

  function automatic int unsigned ones6(input logic [5:0] v);
    int unsigned n = 0;
    for (int i = 0; i < 6; i++) n += v[i];
    return n;
  endfunction

  function automatic int unsigned ones4(input logic [3:0] v);
    int unsigned n = 0;
    for (int i = 0; i < 4; i++) n += v[i];
    return n;
  endfunction

  // A 6-bit code alternates with running disparity when unbalanced or 111000.
  function automatic logic alt6(input logic [5:0] c);
    return (ones6(c) != 3) || (c == 6'b111000);
  endfunction

  function automatic logic alt4(input logic [3:0] c);
    return (ones4(c) != 2) || (c == 4'b1100);
  endfunction

  function automatic logic is_kx7(input logic [4:0] x);
    return (x == 5'd23) || (x == 5'd27) || (x == 5'd29) || (x == 5'd30);
  endfunction

  // True for the twelve control symbols: K28.0-K28.7, K23.7, K27.7, K29.7, K30.7.
  function automatic logic is_valid_k(input logic [7:0] d);
    return (d[4:0] == 5'd28) || (d[7:5] == 3'd7 && is_kx7(d[4:0]));
  endfunction

  function automatic enc_res_t encode(input logic [7:0] d, input logic k,
                                      input logic rd_in);
    enc_res_t   r;
    logic [4:0] x = d[4:0];
    logic [2:0] y = d[7:5];
    logic [5:0] c6;
    logic [3:0] c4;
    logic       rd6;
    logic       k28 = k && (x == 5'd28);
    logic       use_a7;

    c6 = k28 ? 6'b001111 : tbl6(x);
    if (rd_in && alt6(c6)) c6 = ~c6;
    rd6 = (ones6(c6) == 3) ? rd_in : (ones6(c6) == 4);

    use_a7 = (y == 3'd7) &&
             ((k && is_kx7(x)) ||
              (!rd6 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
              ( rd6 && (x == 5'd11 || x == 5'd13 || x == 5'd14)));
    if (k28) begin
      c4 = rd6 ? ~tbl4k(y) : tbl4k(y);
    end else begin
      c4 = use_a7 ? 4'b0111 : tbl4(y);
      if (rd6 && alt4(c4)) c4 = ~c4;
    end
    r.code = {c6, c4};
    r.rd   = (ones4(c4) == 2) ? rd6 : (ones4(c4) == 3);
    return r;
  endfunction

  function automatic dec_res_t decode(input logic [9:0] code, input logic rd_in);
    dec_res_t   r;
    logic [5:0] c6 = code[9:4];
    logic [3:0] c4 = code[3:0];
    logic [3:0] n4;
    logic       f6 = 1'b0;
    logic       f4 = 1'b0;
    logic       rd6;
    int unsigned p6 = ones6(c6);
    int unsigned p4 = ones4(c4);
    logic       k28 = (c6 == 6'b001111) || (c6 == 6'b110000);

    r = '0;
    // 6-bit sub-block
    if (k28) begin
      r.data[4:0] = 5'd28;
      f6 = 1'b1;
    end else begin
      for (int i = 0; i < 32; i++) begin
        logic [5:0] t = tbl6(5'(i));
        if (c6 == t || (alt6(t) && c6 == ~t)) begin
          r.data[4:0] = 5'(i);
          f6 = 1'b1;
        end
      end
    end
    if ((p6 == 4 && rd_in) || (p6 == 2 && !rd_in) ||
        (c6 == 6'b111000 && rd_in) || (c6 == 6'b000111 && !rd_in))
      r.disp_err = 1'b1;
    rd6 = (p6 == 3) ? rd_in : (p6 == 4);

    // 4-bit sub-block
    if (k28) begin
      n4 = (c6 == 6'b110000) ? c4 : ~c4;
      for (int j = 0; j < 8; j++)
        if (n4 == tbl4k(3'(j))) begin
          r.data[7:5] = 3'(j);
          f4 = 1'b1;
        end
      r.k = 1'b1;
    end else begin
      for (int j = 0; j < 8; j++) begin
        logic [3:0] t = tbl4(3'(j));
        if (c4 == t || (alt4(t) && c4 == ~t)) begin
          r.data[7:5] = 3'(j);
          f4 = 1'b1;
        end
      end
      if (c4 == 4'b0111 || c4 == 4'b1000) begin
        r.data[7:5] = 3'd7;
        f4 = 1'b1;
        r.k = is_kx7(r.data[4:0]);
      end
    end
    if ((p4 == 3 && rd6) || (p4 == 1 && !rd6) ||
        (c4 == 4'b1100 && rd6) || (c4 == 4'b0011 && !rd6))
      r.disp_err = 1'b1;
    r.code_err = !f6 || !f4;
    r.rd = (p4 == 2) ? rd6 : (p4 == 3);
    return r;
  endfunction

endpackage
