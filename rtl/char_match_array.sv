// char_match_array -- the comparator grid that decodes the incoming bytes.
//
// There is one comparator per possible byte value (256 columns) in each of
// the P rows; row j compares input byte j+1 of the current word.  Column X
// drives match[X][P-1:0], the MX[1:P] signals of the processing elements
// that hold character X (match[X][0] is MX1, the earliest byte).  For every
// word exactly one comparator per valid row fires, so P of the 256*P
// outputs are high.  The grid is purely combinational.
//
// lane_valid is this design's own addition: it masks the rows of a
// partially filled last word (and all rows when no word is presented), so
// that stale bytes cannot start or extend a match.  Columns that no
// signature uses are left unloaded and disappear in synthesis.
module char_match_array #(
  parameter int unsigned P = smp_pkg::DEF_P
) (
  input  logic [P-1:0][7:0]   data,        // data[j] = byte j+1 of the word
  input  logic [P-1:0]        lane_valid,  // row j holds a real byte
  output logic [255:0][P-1:0] match        // match[X][j] = MX(j+1)
);

  always_comb begin
    for (int x = 0; x < 256; x++)
      for (int j = 0; j < P; j++)
        match[x][j] = lane_valid[j] && (data[j] == 8'(x));
  end

endmodule
