// Shared types for the FM0/Manchester line codec.
//
// The coding mode is the select of the output multiplexer (MUX_2) of the
// encoder: input 0 carries the FM0 code and input 1 the Manchester code, so
// the encoding of the enum follows those input numbers. The same type selects
// the decoding rule on the receive side.
package dsrc_codec_pkg;

  typedef enum logic {
    MODE_FM0        = 1'b0,
    MODE_MANCHESTER = 1'b1
  } code_mode_e;

endpackage : dsrc_codec_pkg
