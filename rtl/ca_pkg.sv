// ca_pkg: types, constants and configuration functions shared by the
// cellular-automaton (CA) accelerator.
//
// The accelerator streams a 2-D grid of cells from external memory through a
// set of on-chip line buffers into a pipelined engine that evaluates an n x n
// neighbourhood per clock. This package holds what several modules agree on:
// the grid topology, the rule selector, the memory command encoding and the
// neighbourhood weight function. The default numbers (1920x1080 grid, 8-bit
// cells, 29x29 neighbourhood, 128-bit bursts, toroidal grid) are the main
// configuration of the original design. The weight patterns are this
// design's own choice where the original only shows them as pictures.
package ca_pkg;

  // Grid topology: zero-padded rectangle, left/right wrap (cylinder), or
  // left/right plus top/bottom wrap (torus).
  typedef enum logic [1:0] {
    GRID_RECT  = 2'd0,
    GRID_CYL   = 2'd1,
    GRID_TORUS = 2'd2
  } grid_e;

  // Transition rules that the engine can be built for.
  typedef enum logic [1:0] {
    RULE_HODGEPODGE = 2'd0,  // Hodgepodge Machine (excitable medium, 256 states)
    RULE_GREENBERG  = 2'd1,  // Greenberg-Hastings excitable medium
    RULE_APHYSICS   = 2'd2   // "Artificial Physics" outer-totalistic binary rule
  } rule_e;

  // Colour palettes of the graphics output.
  typedef enum logic {
    PAL_WINDOWS  = 1'b0,     // 16-colour indexed palette
    PAL_GRADIENT = 1'b1      // grey ramp
  } palette_e;

  // Memory command encoding of the user interface of the DDR controller.
  typedef enum logic [2:0] {
    MEM_WRITE = 3'b000,
    MEM_READ  = 3'b001
  } mem_cmd_e;


  // Weight (0..15) of the neighbour at window row i, column j (0..n-1, the
  // centre is at (n-1)/2, (n-1)/2).
  //  - Hodgepodge: 1 everywhere, or, when weighted, a fixed pseudo-random
  //    4-bit value 1..15 per position (integer hash of i and j).
  //  - Greenberg-Hastings: 1 everywhere (square Moore neighbourhood).
  //  - Artificial Physics: binary disc of radius (n-1)/2 without the centre.
  function automatic int unsigned nb_weight(rule_e rule, bit weighted,
                                            int unsigned n, int unsigned i,
                                            int unsigned j);
    int signed di, dj, r;
    int unsigned hsh;
    r  = (int'(n) - 1) / 2;
    di = int'(i) - r;
    dj = int'(j) - r;
    case (rule)
      RULE_APHYSICS:
        return ((di*di + dj*dj <= r*r) && !(di == 0 && dj == 0)) ? 1 : 0;
      RULE_GREENBERG:
        return 1;
      default: begin
        if (!weighted) return 1;
        hsh = (i * 32'd2654435761) ^ (j * 32'd40503) ^ 32'h5bd1e995;
        hsh = hsh ^ (hsh >> 15);
        hsh = hsh * 32'd2246822519;
        hsh = hsh ^ (hsh >> 13);
        return (hsh % 15) + 1;
      end
    endcase
  endfunction

  // Ceiling of log2, at least 1.
  function automatic int unsigned clog2_min1(int unsigned v);
    return (v <= 2) ? 1 : $clog2(v);
  endfunction

endpackage
