// csd_ref_pkg: reference models for the recoder testbenches.
//
// ref_recode() is Reitwiesner's serial recoding, written directly from the
// eight-row recoding table (x_{i+1}, x_i, c_i -> y_i, c_{i+1}) and scanned
// from the LSB with c_0 = 0. It shares no code with the RTL. digits_value()
// and is_canonical() check a digit vector independently of any model.
package csd_ref_pkg;

  localparam int MAXD = 64;
  typedef logic [MAXD-1:0][1:0] dvec_t;   // 2-bit digits: 00 0, 01 +1, 10 -1

  // Recoding table, indexed by {x_{i+1}, x_i, c_i}.
  //   row:        000 001 010 011 100 101 110 111
  //   y_i:          0  +1  +1   0   0  -1  -1   0
  //   c_{i+1}:      0   0   0   1   0   1   1   1
  function automatic void table_row(input logic [2:0] idx,
                                    output logic [1:0] y, output logic cn);
    case (idx)
      3'b000: begin y = 2'b00; cn = 1'b0; end
      3'b001: begin y = 2'b01; cn = 1'b0; end
      3'b010: begin y = 2'b01; cn = 1'b0; end
      3'b011: begin y = 2'b00; cn = 1'b1; end
      3'b100: begin y = 2'b00; cn = 1'b0; end
      3'b101: begin y = 2'b10; cn = 1'b1; end
      3'b110: begin y = 2'b10; cn = 1'b1; end
      default: begin y = 2'b00; cn = 1'b1; end
    endcase
  endfunction

  // Serial recoding of the nbits-bit number x into ndig digits; carries
  // c_0..c_ndig are returned in c.
  function automatic void ref_recode(input longint unsigned x, input int ndig,
                                     output dvec_t y, output logic [MAXD:0] c);
    logic [MAXD+1:0] xe;
    xe = '0;
    for (int i = 0; i < MAXD && i < 64; i++) xe[i] = x[i];
    y = '0;
    c = '0;
    for (int i = 0; i < ndig; i++) begin
      logic [1:0] d;
      logic cn;
      table_row({xe[i+1], xe[i], c[i]}, d, cn);
      y[i] = d;
      c[i+1] = cn;
    end
  endfunction

  function automatic longint digits_value(dvec_t y, int ndig);
    longint v = 0;
    for (int i = 0; i < ndig; i++) begin
      if (y[i] == 2'b01) v += longint'(1) << i;
      else if (y[i] == 2'b10) v -= longint'(1) << i;
    end
    return v;
  endfunction

  function automatic bit is_canonical(dvec_t y, int ndig);
    for (int i = 0; i < ndig; i++) begin
      if (y[i] == 2'b11) return 0;
      if (i > 0 && y[i] != 2'b00 && y[i-1] != 2'b00) return 0;
    end
    return 1;
  endfunction

  // Compare the low n bits of two carry vectors.
  function automatic bit carries_equal(logic [MAXD:0] a, logic [MAXD:0] b, int n);
    for (int i = 0; i < n; i++) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

  function automatic int weight(dvec_t y, int ndig);
    int w = 0;
    for (int i = 0; i < ndig; i++) if (y[i] != 2'b00) w++;
    return w;
  endfunction

endpackage
