// dc_ref_pkg: reference model of the digital core's 16 path functions for the
// testbenches, kept as the Karnaugh maps are usually drawn: rows are the two
// upper inputs of the group (in3 in4), columns the two lower ones (in1 in2),
// both in Gray order 00 01 11 10. Independent of the hexadecimal truth tables
// in the design package.
package dc_ref_pkg;
  timeunit 1ps; timeprecision 1fs;

  typedef string kmap_t [4];
  localparam kmap_t KMAP [16] = '{
    '{"0100", "1010", "1000", "0100"}, '{"0100", "1010", "0100", "0000"},
    '{"1010", "0100", "0000", "0000"}, '{"0100", "0010", "0100", "0000"},
    '{"1011", "0111", "0000", "0100"}, '{"0100", "1010", "0100", "0001"},
    '{"1010", "0100", "0000", "0001"}, '{"0100", "0010", "0100", "0001"},
    '{"1011", "0101", "0000", "0101"}, '{"0100", "1110", "1100", "0000"},
    '{"1010", "0100", "1000", "0000"}, '{"0100", "0010", "1100", "0001"},
    '{"0101", "1111", "0100", "0101"}, '{"0001", "1101", "1000", "0100"},
    '{"0100", "1101", "1000", "0100"}, '{"0001", "0000", "1000", "0001"}
  };

  // Gray position of a 2-bit value: 00->0, 01->1, 11->2, 10->3.
  function automatic int gray_pos(bit hi, bit lo);
    case ({hi, lo})
      2'b00: return 0;
      2'b01: return 1;
      2'b11: return 2;
      default: return 3;
    endcase
  endfunction

  // Output of path k (0-based) for the 16-bit core input vector.
  function automatic bit path_out(int k, logic [15:0] din);
    int g = k / 4;
    bit i1 = din[4*g], i2 = din[4*g+1], i3 = din[4*g+2], i4 = din[4*g+3];
    string row = KMAP[k][gray_pos(i3, i4)];
    return row[gray_pos(i1, i2)] == "1";
  endfunction

  function automatic logic [15:0] core_out(logic [15:0] din);
    logic [15:0] r;
    for (int k = 0; k < 16; k++) r[k] = path_out(k, din);
    return r;
  endfunction
endpackage
