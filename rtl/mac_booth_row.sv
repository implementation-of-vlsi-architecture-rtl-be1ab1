// mac_booth_row -- one partial-product row of the radix-4 Booth multiplier.
//
// A three-bit window of the multiplier (y_{2j+1}, y_{2j}, y_{2j-1}) selects,
// through multiplexers, 0, X or 2X; for the negative digits (-X, -2X) the row
// is inverted and the add cell, a chain of half adders, adds 1 at its least
// significant bit, so the row leaves here as a complete two's-complement
// value. The row is sign-extended to 2W bits and not yet shifted.
// Combinational. The published design names the multiplexers, half adders and
// "add cell"; the Booth digit selection is this design's reading of them.
module mac_booth_row #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   x,       // multiplicand, signed
  input  logic [2:0]     win,     // Booth window {y_{2j+1}, y_{2j}, y_{2j-1}}
  output logic [2*W-1:0] row      // signed digit * x, 2W bits
);
  logic           one_x, two_x, neg;
  logic [2*W-1:0] x_ext, mag, inv;
  logic [2*W-1:0] hc;             // half-adder carries of the add cell

  always_comb begin
    // digit = -2*y_{2j+1} + y_{2j} + y_{2j-1}
    one_x = win[0] ^ win[1];
    two_x = (win == 3'b011) || (win == 3'b100);
    neg   = win[2] & ~(win[1] & win[0]);

    x_ext = {{W{x[W-1]}}, x};
    mag   = one_x ? x_ext : (two_x ? (x_ext << 1) : '0);
    inv   = neg ? ~mag : mag;
  end

  // add cell: increment by neg with a ripple of half adders
  assign hc[0] = neg;
  for (genvar k = 0; k < 2 * W; k++) begin : g_ha
    assign row[k] = inv[k] ^ hc[k];
    if (k < 2 * W - 1) begin : g_carry
      assign hc[k+1] = inv[k] & hc[k];   // the top carry would leave the row
    end
  end
endmodule
