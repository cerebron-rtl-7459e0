// Shared types and constants of the Cerebron spiking-network accelerator.
//
// The compute engine is an M x N array of computing units (CUs), each holding L
// processing elements (PEs). A PE receives one VEC-bit neuron-state index vector and
// VEC synaptic weights per step, accumulates only the aligned non-zero pairs and fires
// an integrate-and-fire neuron with reset by subtraction. The array size 8 x 8 x 4
// follows the design description; VEC, the word widths and the coordinate widths are
// choices of this implementation.
package cerebron_pkg;

  // Array geometry: M CU columns, N CU rows, L PEs per CU.
  localparam int unsigned M   = 8;
  localparam int unsigned N   = 8;
  localparam int unsigned L   = 4;
  // Bits of one neuron-state index vector (channels per buffer word).
  localparam int unsigned VEC = 8;
  // Synaptic weight and membrane potential widths (two's complement).
  localparam int unsigned WW  = 8;
  localparam int unsigned VW  = 16;
  // Width of the weight-register-file tag carried by every item.
  localparam int unsigned TAGW = 10;
  // Membrane-potential bank address width (one bank per PE).
  localparam int unsigned VAW = 11;
  // Coordinate widths of output neurons.
  localparam int unsigned YW  = 8;
  localparam int unsigned CHW = 10;

  typedef logic signed [WW-1:0] weight_t;
  typedef logic signed [VW-1:0] vmem_t;
  typedef weight_t [VEC-1:0]    wvec_t;
  // Signed pixel coordinate; negative marks a padding position.
  typedef logic signed [YW:0]   coord_t;

  // Intra-CU (PE) function.
  typedef enum logic [1:0] {
    PE_POOL    = 2'd0,   // average pooling: count input spikes
    PE_ALONE   = 2'd1,   // stand-alone convolution (depthwise)
    PE_CASCADE = 2'd2    // cascade convolution (standard / pointwise)
  } pe_mode_e;

  // Layer type handled by the controller.
  typedef enum logic [1:0] {
    L_STD  = 2'd0,       // standard convolution, pointwise when K = 1
    L_DW   = 2'd1,       // depthwise convolution
    L_POOL = 2'd2        // average pooling, stride = window
  } layer_e;

  // Output neuron identity carried with an item and returned with the spike.
  typedef struct packed {
    logic [YW-1:0]  y;
    logic [YW-1:0]  x;
    logic [CHW-1:0] ch;
    logic [VAW-1:0] vaddr;
  } meta_t;

  // One step of work for one CU: an index vector per PE plus bookkeeping.
  typedef struct packed {
    logic                    valid;   // item carries work (0: bubble)
    logic                    first;   // first item of an output neuron
    logic                    last;    // last item of an output neuron
    logic [L-1:0]            en;      // PE l owns a real output neuron
    logic [L-1:0][VEC-1:0]   idx;     // neuron-state index vector per PE
    logic [TAGW-1:0]         tag;     // weight register file entry
    meta_t                   meta;
  } item_t;

  // Layer configuration written by the host.
  typedef struct packed {
    layer_e         ltype;
    logic [3:0]     k;        // kernel / window size
    logic [1:0]     s;        // stride
    logic [YW-1:0]  h, w;     // input height, width
    logic [YW-1:0]  ho, wo;   // output height, width
    logic [6:0]     cg;       // input channel groups (channels / VEC)
    logic [CHW:0]   f;        // output channels (STD) or channels (DW, POOL)
    vmem_t          vth;      // firing threshold
    logic           first_step; // first time step: membrane potentials start at 0
    logic           sched_en;   // use the scheduling table for channel order
    logic [15:0]    wbase;      // first weight-buffer word of the layer
    logic [13:0]    ibase;      // first input neuron-state word
    logic [13:0]    obase;      // first output neuron-state word
    logic [VAW-1:0] vbase;      // first membrane-potential word of every bank
  } layer_cfg_t;

  // Buffer sizes.
  localparam int unsigned NS_DEPTH   = 16384;  // neuron-state words of VEC bits
  localparam int unsigned W_DEPTH    = 65536;  // weight words of VEC weights
  localparam int unsigned V_DEPTH    = 2048;   // membrane-potential words per PE bank
  localparam int unsigned RF_ROWS    = 16;     // input rows held by the data collection unit
  localparam int unsigned ROW_WORDS  = 2048;   // words per held row (width x channel groups)
  localparam int unsigned KMAX       = 8;      // largest window (pooling)
  localparam int unsigned WRF_DEPTH  = 576;    // weight register file entries per column
  localparam int unsigned FMAX       = 512;    // channels tracked by the scheduler
  localparam int unsigned NPE        = N*M*L;

endpackage
