// tcam_ref_pkg: reference model of the IPv6 lookup table for the testbenches.
//
// Entries are kept as (prefix value, prefix length) pairs and matched by comparing the top
// "length" bits, independently of how the hardware encodes don't-care bits. The package also
// gives the row image (BL, X_Data) that stores a set of entries in one bank row: in Type 1 each
// 32-bit block holds one prefix, in Type 2 blocks 1-2 and 3-4 hold one prefix each, in Type 3
// the row holds one prefix. The don't-care bits of the stored data are filled with random bits.
package tcam_ref_pkg;

  typedef struct {
    bit           valid;
    logic [127:0] value;
    int           len;
  } entry_t;

  // Does the search word fall under the prefix?
  function automatic bit prefix_match(entry_t e, logic [127:0] key);
    logic [127:0] care;
    if (!e.valid) return 0;
    care = (e.len >= 128) ? '1 : ~({128{1'b1}} >> e.len);
    return ((e.value ^ key) & care) == 0;
  endfunction

  // First-X code of a 32-bit block that holds bits [hi:hi-31] of a prefix of length len.
  function automatic logic [4:0] xcode(int len, int block_top);
    automatic int care_bits = len - block_top;       // bits of this block inside the prefix
    if (care_bits >= 32) return 5'd0;
    return 5'(32 - care_bits);
  endfunction

  // Entries per row of a bank type; 0 for an empty bank.
  function automatic int slots_per_row(int t);
    case (t)
      1: return 4;
      2: return 2;
      3: return 1;
      default: return 0;
    endcase
  endfunction

  // 32-bit slot (0..3) of entry s of a row.
  function automatic int slot_pos(int t, int s);
    return (t == 2) ? 2 * s : s;
  endfunction

  // Build the row image for up to four entries of bank type t.
  function automatic void row_image(int t, entry_t e [4], output logic [127:0] bl,
                                    output logic [19:0] xd);
    bl = {$urandom, $urandom, $urandom, $urandom};
    xd = '0;
    for (int s = 0; s < slots_per_row(t); s++) begin
      automatic logic [127:0] v = e[s].value;
      if (t == 1) begin
        bl[127 - 32*s -: 32] = (v[127:96] & (~32'd0 << (32 - e[s].len))) |
                               (bl[127 - 32*s -: 32] & ~(~32'd0 << (32 - e[s].len)));
        xd[19 - 5*s -: 5] = xcode(e[s].len, 0);
      end else if (t == 2) begin
        automatic logic [63:0] care = ~(64'd0) << (64 - e[s].len);
        bl[127 - 64*s -: 64] = (v[127:64] & care) | (bl[127 - 64*s -: 64] & ~care);
        xd[19 - 10*s -: 5] = xcode(e[s].len, 0);
        xd[14 - 10*s -: 5] = xcode(e[s].len, 32);
      end else begin
        automatic logic [127:0] care = (e[s].len >= 128) ? '1 : ~({128{1'b1}} >> e[s].len);
        bl = (v & care) | (bl & ~care);
        for (int b = 0; b < 4; b++) xd[19 - 5*b -: 5] = xcode(e[s].len, 32*b);
      end
    end
  endfunction

  // Random prefix whose length suits bank type t (Type 1: min_len1..32, Type 3: 97..128).
  function automatic entry_t rand_entry(int t, int min_len1 = 1);
    entry_t e;
    e.valid = 1;
    e.value = {$urandom, $urandom, $urandom, $urandom};
    case (t)
      1: e.len = $urandom_range(min_len1, 32);
      2: e.len = $urandom_range(33, 64);
      default: e.len = $urandom_range(97, 128);
    endcase
    return e;
  endfunction

  // A search key that falls under prefix e, with random bits after the prefix.
  function automatic logic [127:0] key_under(entry_t e);
    automatic logic [127:0] r = {$urandom, $urandom, $urandom, $urandom};
    automatic logic [127:0] care = (e.len >= 128) ? '1 : ~({128{1'b1}} >> e.len);
    return (e.value & care) | (r & ~care);
  endfunction

endpackage
