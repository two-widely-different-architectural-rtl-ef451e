// smem_pkg: sizes and the crossbar word format of the UWGSP4 shared memory.
//
// The shared memory serves the 16 vector processing units through eight
// port controllers, an 8 x 8 crossbar and eight memory controllers, each of
// which runs four memory modules: 32 modules in all, interleaved so that
// consecutive word addresses fall in consecutive modules. The counts (8, 8,
// 32-way) and the 40-bit crossbar width follow the published description;
// the address split, the module size and cycle time and the tag format are
// this design's choices.
//
// Word address a: memory controller a[2:0], module inside it a[4:3], word
// inside the module a[ADDR_W-1:5]. A crossbar word is 40 bits: an 8-bit tag
// (3-bit port number, write flag, 4 spare bits) and a 32-bit data word.
package smem_pkg;
  localparam int unsigned N_PORT    = 8;   // port controllers
  localparam int unsigned N_MC      = 8;   // memory controllers
  localparam int unsigned N_MOD     = 4;   // modules per memory controller (8 x 4 = 32-way)
  localparam int unsigned XBAR_W    = 40;  // crossbar word: tag + data
  localparam int unsigned DATA_W    = 32;
  localparam int unsigned TAG_W     = XBAR_W - DATA_W;

  typedef struct packed {
    logic [2:0] port;   // requesting port controller (where the reply goes)
    logic       write;
    logic [3:0] spare;
  } smem_tag_t;
endpackage
