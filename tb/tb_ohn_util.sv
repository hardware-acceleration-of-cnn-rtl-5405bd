// tb_ohn_util - reference arithmetic shared by the testbenches.
//
// Decodes one-hot codes ({sign, exponent, nz}, see ohn_pkg) into integers and
// makes random codes, so that expected results are computed with ordinary
// integer multiplication and addition, independently of the exponent-add and
// histogram hardware under test.
package tb_ohn_util;

  // Integer value of a code with exponent width ew.
  function automatic longint oh_val(input logic [7:0] code, input int ew);
    longint mag;
    int     e;
    if (!code[0]) return 0;
    e   = int'((code >> 1) & ((1 << ew) - 1));
    mag = longint'(1) << e;
    return code[ew+1] ? -mag : mag;
  endfunction

  // Random code: zero with probability 1/zero_in, else random sign/exponent.
  // Unsigned values (activations after ReLU) when signed_ok is 0.
  function automatic logic [7:0] oh_rand(input int ew, input int zero_in,
                                          input bit signed_ok);
    logic [7:0] c;
    c = '0;
    if (($urandom % zero_in) == 0) return c;
    c[0] = 1'b1;
    c    = c | 8'(($urandom % (1 << ew)) << 1);
    if (signed_ok) c[ew+1] = 1'($urandom % 2);
    return c;
  endfunction

endpackage
