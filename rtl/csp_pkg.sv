// Shared types for the CSP-style process network.
//
// Every CSP channel in this design is a valid/ready pair plus a data bus: a
// message passes on a rising clock edge where the sender's valid and the
// receiver's ready are both high, which stands for the rendezvous of a CSP
// "c!x" with a "c?y". A stream (a list sent one item at a time) is such a
// channel with an extra eot flag beside the data, so end of transmission is
// one more message in the same order as the values. A vector is one channel
// per element, each with its own handshake.
package csp_pkg;

  // The binary process F placed in every lane of a VZIP.
  typedef enum logic {
    OP_ADD = 1'b0,
    OP_MUL = 1'b1
  } op_e;

  // Message kinds on a stream of streams (result of the third design):
  // a value, the end of one inner stream, or the end of the outer stream.
  typedef enum logic [1:0] {
    TK_VALUE = 2'd0,
    TK_EOS   = 2'd1,
    TK_EOT   = 2'd2
  } tag_e;

  // Width of a scalar product of two M-element vectors of DATA_W-bit words,
  // large enough that no sum can overflow.
  function automatic int acc_width(int data_w, int m);
    return 2 * data_w + $clog2(m);
  endfunction

endpackage
