// ecc_pkg: shared widths, curve constants and types of the Ed25519 crypto-core.
//
// The core works over the prime field GF(p), p = 2^255 - 19, on the twisted
// Edwards curve -x^2 + y^2 = 1 + d x^2 y^2 (a = -1) in projective
// coordinates (X:Y:Z) with x = X/Z, y = Y/Z.  Field elements are 256 bits
// wide; the modular adders compute on 257 bits and the multiplier and the
// inverter on 258 bits so that carries and the sign survive.
//
// The constants are the standard Ed25519 values: p, d = -121665/121666 mod p
// and the base point G = (Gx, Gy, 1).  G2 is the projective double of G
// computed with the doubling formulas used by point_double
// (X = 2XY(Y^2-X^2-2Z^2), Y = (X^2-Y^2)(X^2+Y^2), Z = (Y^2-X^2)(Y^2-X^2-2Z^2)),
// which the ladder stores as its second starting value.
package ecc_pkg;

  localparam int unsigned N    = 256;     // field element width
  localparam int unsigned NADD = N + 1;   // modular adder/subtractor width
  localparam int unsigned NMUL = N + 2;   // multiplier / inverter width

  typedef logic [N-1:0] fe_t;             // field element

  typedef struct packed {
    fe_t x;
    fe_t y;
    fe_t z;
  } point_t;                              // projective point (X:Y:Z)

  localparam fe_t P_MOD = 256'h7fffffffffffffffffffffffffffffffffffffffffffffffffffffffffffffed;
  localparam fe_t D_CURVE = 256'h52036cee2b6ffe738cc740797779e89800700a4d4141d8ab75eb4dca135978a3;

  localparam point_t G_POINT = '{
    x: 256'h216936d3cd6e53fec0a4e231fdd6dc5c692cc7609525a7b2c9562d608f25d51a,
    y: 256'h6666666666666666666666666666666666666666666666666666666666666658,
    z: 256'h1
  };

  localparam point_t G2_POINT = '{
    x: 256'h31241ddb9a7c254aea224b87b7b0f909886ec1ddfa71625b7aba864c18300a57,
    y: 256'h3324984c6cc933db69b782fc3ac951f60a47aa662bbe321c924b2cd95e2d7fd7,
    z: 256'h6986c5796b577c574098d1fa3b426292ebd36100339299d16374a93d0278de6b
  };

endpackage
