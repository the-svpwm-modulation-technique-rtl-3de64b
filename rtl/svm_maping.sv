// svm_maping: finds the switching index of one space-vector-diagram vector.
//
// The source design instantiates it three times, once per nearest vector, and feeds
// the index to time_table. The index is the vector's row in the source design's table
// of real switching combinations (svm_pkg::SVEC_ROW); a vector outside the
// outer hexagon gets IDX_INVALID. Purely combinational.
module svm_maping
  import svm_pkg::*;
(
  input  coord_t               Vx_1,   // ab
  input  coord_t               Vx_2,   // bc
  input  coord_t               Vx_3,   // ca
  output logic [IDX_W-1:0]     switch_Vx_index
);

  always_comb begin
    switch_Vx_index = IDX_INVALID;
    for (int i = 0; i < int'(N_VEC); i++) begin
      if (SVEC_ROW[i].ab == Vx_1 && SVEC_ROW[i].bc == Vx_2 && SVEC_ROW[i].ca == Vx_3)
        switch_Vx_index = IDX_W'(i);
    end
  end

endmodule
