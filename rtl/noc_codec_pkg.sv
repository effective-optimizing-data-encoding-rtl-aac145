// noc_codec_pkg: types shared by the flit encoders, decoder and top.
//
// A flit on the network carries a type on a sideband next to its data lines.
// Head flits hold routing information and are never encoded; body and tail
// flits are encoded end to end between the two network interfaces. The
// encoding of the flit type is this design's own choice.
package noc_codec_pkg;

  typedef enum logic [1:0] {
    FLIT_HEAD = 2'd0,
    FLIT_BODY = 2'd1,
    FLIT_TAIL = 2'd2
  } flit_type_e;

endpackage
