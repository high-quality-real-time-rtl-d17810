// segmentation: threshold segmentation of the grey reference image. The label of
// a pixel is the number of the L-1 thresholds k*256/L (k = 1..L-1) that its grey
// level reaches, i.e. the grey range is cut into L equal bands. Pixels of one
// band form one segment for the segment-based median filter. The document only
// says that a simple thresholding method forms the segments; the equal-band
// thresholds and L = 8 are this design's choice. Purely combinational.
module segmentation #(
  parameter int unsigned L  = 8,
  parameter int unsigned SW = (L > 1) ? $clog2(L) : 1
) (
  input  logic [7:0]    gray,
  output logic [SW-1:0] label
);
  always_comb begin
    label = '0;
    for (int k = 1; k < L; k++) begin
      if (32'(gray) >= (k * 256) / L) label = label + SW'(1);
    end
  end
endmodule
