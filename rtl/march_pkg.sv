// march_pkg: types and the element table of the March iC- memory test.
//
// March iC- keeps the six elements and the 10N length of March C- but
// (1) walks the addresses in an order where consecutive addresses differ in
// a single bit (Hd = 1) and (2) replaces the solid 0/1 data by alternating
// data A_v: the value starts at v on the first address an element visits and
// flips on every following address. In the up order the k-th address gets
// v ^ k[0]; because the number of addresses is even, the down order (which
// starts at index N-1) gives v ^ 1 ^ k[0] at index k. Each operation is
// therefore described by a phase bit p (0 for A_v, 1 for A_v-bar), and the
// data at up-order index k is  v ^ p ^ down ^ k[0].
//
// Element table (up = ascending, dn = descending order):
//   M0 up (w A_v)        M1 up (r A_v,  w A_vb)   M2 up (r A_vb, w A_v)
//   M3 dn (r A_vb, w A_v) M4 dn (r A_v,  w A_vb)  M5 up (r A_v)
// The final element reads A_v: after M4 writes A_vb in descending order, the
// last cell written (index 0) holds v, so an ascending read must expect A_v.
// This is what makes the test pass on a fault-free memory.
package march_pkg;

  typedef enum logic [2:0] {
    ELEM_M0 = 3'd0,
    ELEM_M1 = 3'd1,
    ELEM_M2 = 3'd2,
    ELEM_M3 = 3'd3,
    ELEM_M4 = 3'd4,
    ELEM_M5 = 3'd5
  } elem_e;

  // One March element: direction, which operations it holds and their
  // alternating-data phases. A read, when present, comes before the write.
  typedef struct packed {
    logic down;      // 1: descending address order
    logic has_read;
    logic has_write;
    logic rd_phase;  // 0: read A_v, 1: read A_v-bar
    logic wr_phase;  // 0: write A_v, 1: write A_v-bar
  } elem_t;

  function automatic elem_t elem_desc(elem_e e);
    unique case (e)
      ELEM_M0: return '{down: 1'b0, has_read: 1'b0, has_write: 1'b1, rd_phase: 1'b0, wr_phase: 1'b0};
      ELEM_M1: return '{down: 1'b0, has_read: 1'b1, has_write: 1'b1, rd_phase: 1'b0, wr_phase: 1'b1};
      ELEM_M2: return '{down: 1'b0, has_read: 1'b1, has_write: 1'b1, rd_phase: 1'b1, wr_phase: 1'b0};
      ELEM_M3: return '{down: 1'b1, has_read: 1'b1, has_write: 1'b1, rd_phase: 1'b1, wr_phase: 1'b0};
      ELEM_M4: return '{down: 1'b1, has_read: 1'b1, has_write: 1'b1, rd_phase: 1'b0, wr_phase: 1'b1};
      ELEM_M5: return '{down: 1'b0, has_read: 1'b1, has_write: 1'b0, rd_phase: 1'b0, wr_phase: 1'b0};
      default: return '0;
    endcase
  endfunction

  // Alternating data bit for start value v, phase p, direction and the
  // up-order index parity k0.
  function automatic logic alt_bit(logic v, logic p, logic down, logic k0);
    return v ^ p ^ down ^ k0;
  endfunction

  // Binary-reflected Gray code: consecutive indices map to addresses at
  // Hamming distance 1.
  function automatic logic [31:0] gray32(logic [31:0] k);
    return k ^ (k >> 1);
  endfunction

endpackage
