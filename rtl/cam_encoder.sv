// cam_encoder: 4:2 encoder turning the look-up table's match lines into the
// index of the matching word.
//
// addr is the index of the matching line and hit says that one matched. When
// several lines match (duplicate words) the lowest index wins; with one-hot
// input this is the plain 4:2 encoder addr = {m3|m2, m3|m1}. Purely
// combinational. The gate-level reversible realisation of this encoder is not
// reproduced; this is the simplest logic with its function.
module cam_encoder (
  input  logic [3:0] match,
  output logic [1:0] addr,
  output logic       hit
);
  always_comb begin
    hit  = |match;
    unique casez (match)
      4'b???1: addr = 2'd0;
      4'b??10: addr = 2'd1;
      4'b?100: addr = 2'd2;
      default: addr = 2'd3;   // 4'b1000, or no match (hit low)
    endcase
  end
endmodule
