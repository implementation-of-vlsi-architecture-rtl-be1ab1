// mac_multiplier -- W x W signed multiplier: Booth rows summed by an array of
// majority-gate adders.
//
// The multiplier y is recoded into W/2 radix-4 Booth digits; mac_booth_row
// turns each digit into a two's-complement partial product (multiplexers
// plus an add cell). Row j is shifted left by 2j and the rows are added one
// after another by W/2-1 qca_adder instances of width 2W, so the product is
// exact modulo 2^(2W), which holds any signed W x W product. Combinational.
// The published design gives the ingredients (multiplexers, half and full
// adders, the add cell, and its own adder in the adder array); operand width
// and Booth recoding are this design's choices. W must be even, at least 4.
module mac_multiplier #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   x,
  input  logic [W-1:0]   y,
  output logic [2*W-1:0] p
);
  localparam int unsigned R = W / 2;   // number of partial-product rows

  logic [W:0]     y_ext;
  logic [2*W-1:0] row   [R];
  logic [2*W-1:0] psum  [R];

  assign y_ext = {y, 1'b0};

  for (genvar j = 0; j < R; j++) begin : g_row
    logic [2*W-1:0] raw;
    mac_booth_row #(.W(W)) u_row (.x(x), .win(y_ext[2*j+2:2*j]), .row(raw));
    assign row[j] = raw << (2 * j);
  end

  assign psum[0] = row[0];

  for (genvar j = 1; j < R; j++) begin : g_add
    logic unused_cout;
    qca_adder #(.N(2 * W)) u_add (
      .a   (psum[j-1]),
      .b   (row[j]),
      .s   (psum[j]),
      .cout(unused_cout)   // two's-complement sum: the carry out is discarded
    );
  end

  assign p = psum[R-1];

  initial begin
    assert (W >= 4 && W % 2 == 0) else $fatal(1, "mac_multiplier: W must be even and >= 4");
  end
endmodule
