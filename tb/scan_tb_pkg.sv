// scan_tb_pkg -- shared definitions for the behavioural scan circuit used by
// the testbenches.
//
// The stand-in circuit under test responds to a captured vector v of chain c
// with rotate_left(v, 1) XOR key(c), where key bit i of chain c is a fixed
// pseudo-random bit (its "secret"). key_bit gives that bit.
package scan_tb_pkg;

  function automatic logic key_bit(input int unsigned chain, input int unsigned pos);
    int unsigned h;
    h = (pos * 32'd2654435761) ^ (chain * 32'd40503 + 32'h9e37);
    h = h ^ (h >> 15);
    h = h * 32'd2246822519;
    return h[13];
  endfunction

endpackage
