// echelon_pkg: types and constants shared by the tiled neuromorphic design.
// Weights are 8-bit (the evaluated precision); membrane potential, time and
// address widths are this design's own choices. The component order on the
// tile bus follows the tile drawing left to right: NPU, SFU, NPU, OLU, NPU,
// with the network interface at the end of the bus.
package echelon_pkg;

  localparam int W_W     = 8;   // synaptic weight width (signed)
  localparam int V_W     = 16;  // membrane potential width (signed)
  localparam int T_W     = 16;  // STDP time counter width
  localparam int ADDR_W  = 8;   // neuron address width (up to 256 per layer)
  localparam int COORD_W = 3;   // mesh coordinate width
  localparam int COMP_W  = 3;   // tile component index width
  localparam int NCOMP   = 6;   // components on a tile bus

  // Tile bus component indices (bus switch positions, left to right)
  localparam logic [COMP_W-1:0] COMP_NPU0 = 3'd0;
  localparam logic [COMP_W-1:0] COMP_SFU  = 3'd1;
  localparam logic [COMP_W-1:0] COMP_NPU1 = 3'd2;
  localparam logic [COMP_W-1:0] COMP_OLU  = 3'd3;
  localparam logic [COMP_W-1:0] COMP_NPU2 = 3'd4;
  localparam logic [COMP_W-1:0] COMP_NI   = 3'd5;

  // A spike on the bus or the network: destination tile, component, neuron.
  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
    logic [COMP_W-1:0]  comp;
    logic [ADDR_W-1:0]  addr;
  } spike_pkt_t;

  localparam int PKT_W = $bits(spike_pkt_t);

  // Segmentation switch setting. A is the left (lower index) side of the
  // switch, B the right side, C the local component.
  typedef enum logic [2:0] {
    SW_OFF  = 3'd0,  // segments isolated, component disconnected
    SW_PASS = 3'd1,  // A and B joined (both directions)
    SW_C2A  = 3'd2,  // component drives the left segment
    SW_C2B  = 3'd3,  // component drives the right segment
    SW_A2C  = 3'd4,  // left segment delivers to the component
    SW_B2C  = 3'd5   // right segment delivers to the component
  } sw_mode_e;

  // Configuration write kinds
  typedef enum logic [1:0] {
    CFG_WEIGHT = 2'd0,  // one synaptic weight: layer, row, col, data
    CFG_THRESH = 2'd1,  // firing threshold of a layer
    CFG_LEAK   = 2'd2,  // leak per time step of a layer
    CFG_ROUTE  = 2'd3   // spike destination of a core: data = spike_pkt_t header
  } cfg_kind_e;

  typedef struct packed {
    logic [COORD_W-1:0] x;      // target tile
    logic [COORD_W-1:0] y;
    logic [COMP_W-1:0]  comp;   // target component
    cfg_kind_e          kind;
    logic [1:0]         layer;  // 2 = input layer, 1, 0 = output layer
    logic [7:0]         row;
    logic [7:0]         col;
    logic [15:0]        data;
  } cfg_t;

  // Router ports
  localparam int P_LOCAL = 0;
  localparam int P_NORTH = 1;
  localparam int P_EAST  = 2;
  localparam int P_SOUTH = 3;
  localparam int P_WEST  = 4;

endpackage
