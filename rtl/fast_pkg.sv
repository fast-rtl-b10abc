// fast_pkg: types and constants shared by the blocks of the FAST-1 switch model.
//
// The model is a 4x4 output-buffered ATM switch: four traffic generators feed four
// input modules, which forward cells over dedicated paths to four output modules that
// queue and schedule them with weighted round robin. Cells carry only what the model
// needs: a valid flag and an 8-bit virtual channel identifier (VCI), 9 bits in all.
// Inter-module paths are 18 data bits plus 2 signal lines, of which the cell uses the
// low 9 data bits; the other bits are driven to zero.
package fast_pkg;

  localparam int unsigned N_PORTS  = 4;   // switch size, 4x4
  localparam int unsigned VCI_W    = 8;   // VCI bits carried in a cell
  localparam int unsigned CELL_W   = 9;   // valid flag + VCI
  localparam int unsigned PATH_W   = 18;  // dedicated input->output path width
  localparam int unsigned PORT_W   = 2;   // log2(N_PORTS)
  localparam int unsigned HADDR_W  = 16;  // host address into a module
  localparam int unsigned HDATA_W  = 16;  // host write data (local memories are 16-bit)
  localparam int unsigned HRD_W    = 32;  // host read data (statistics counters are 32-bit)
  localparam int unsigned TIME_W   = 32;  // global cell-time counter

  // One simulated ATM cell.
  typedef struct packed {
    logic             valid;
    logic [VCI_W-1:0] vci;
  } cell_t;

  // One dedicated path between an input module and an output module.
  typedef struct packed {
    logic [1:0]        sig;   // sig[0]: cell present on this path this cell-time
    logic [PATH_W-1:0] data;  // data[CELL_W-1:0] holds the cell
  } path_t;

  function automatic path_t cell_to_path(cell_t c);
    path_t p;
    p.data = '0;
    p.data[CELL_W-1:0] = c;
    p.sig  = {1'b0, c.valid};
    return p;
  endfunction

  function automatic cell_t path_to_cell(path_t p);
    cell_t c;
    c = p.data[CELL_W-1:0];
    c.valid = c.valid & p.sig[0];
    return c;
  endfunction

endpackage
