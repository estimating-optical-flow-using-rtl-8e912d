// pipecnn_pkg: types and constants shared by the convolution accelerator.
//
// Feature data and weights are 16-bit two's-complement fixed point, and
// products are accumulated in 32 bits, as the fixed-point scheme of the
// design requires. The layer descriptor below is what the host hands the
// accelerator for each layer: the shapes, the strides, the fixed-point shift
// amounts and the base addresses of the global-memory buffers. The field
// widths are this design's own choice, sized for FlowNet-S at 384x384.
package pipecnn_pkg;

  localparam int unsigned DATA_W = 16;  // one feature or weight element
  localparam int unsigned ACC_W  = 32;  // accumulator / product width
  localparam int unsigned DIM_W  = 12;  // width, height and window counters
  localparam int unsigned ADDR_W = 32;  // word addresses in the descriptor

  // Largest and smallest value a rescaled output may take.
  localparam int OUT_MAX = 32767;
  localparam int OUT_MIN = -32767;

  typedef enum logic [1:0] {
    OP_CONV   = 2'd0,  // direct convolution
    OP_DECONV = 2'd1,  // transposed convolution (zero insertion in the reader)
    OP_CONCAT = 2'd2   // depth concatenation of up to three buffers
  } op_e;

  typedef struct packed {
    op_e                   op;
    logic [DIM_W-1:0]      in_w;        // input width  (pixels)
    logic [DIM_W-1:0]      in_h;        // input height (pixels)
    logic [DIM_W-1:0]      out_w;       // output width
    logic [DIM_W-1:0]      out_h;       // output height
    logic [7:0]            in_vecs;     // input channels / VEC_SIZE
    logic [7:0]            out_groups;  // output channels / LANE_NUM
    logic [3:0]            k;           // kernel side
    logic [1:0]            stride_log2; // stride = 1 << stride_log2
    logic [3:0]            pad;         // padding as the layer table gives it
    logic                  relu;        // leaky ReLU on negative results
    logic [5:0]            bias_shift;  // frac_w + frac_din
    logic [5:0]            out_shift;   // frac_w + frac_din - frac_dout
    logic [ADDR_W-1:0]     data_base;   // input feature buffer (words)
    logic [ADDR_W-1:0]     weight_base; // weight buffer (words)
    logic [ADDR_W-1:0]     bias_base;   // bias buffer (words)
    logic [ADDR_W-1:0]     out_base;    // output / concatenation destination
    logic [1:0]            cat_num;     // number of concatenation sources, 1..3
    logic [2:0][ADDR_W-1:0] cat_base;   // concatenation source buffers
    logic [2:0][ADDR_W-1:0] cat_len;    // their lengths in words
  } layer_cfg_t;

endpackage
