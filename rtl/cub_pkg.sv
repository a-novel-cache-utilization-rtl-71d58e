// cub_pkg: types and constants shared by the cache-utilization based
// voltage-frequency scaling (CUB VFS) design.
//
// The three operation modes of the 7T/14T L1 cache and the two
// voltage-frequency levels of a core power island follow the operating
// table of the design: normal (0.8 V, 800 MHz, full 8-way capacity,
// 4-cycle L1), dependable low-power (0.55 V, 400 MHz, line-merged 4-way,
// 4-cycle L1) and high-speed (0.8 V, 800 MHz, line-merged 4-way, 3-cycle L1).
// The 32-bit address, 64-byte line and 32-bit core word are this design's
// own choices.
package cub_pkg;

  // Operation modes of the 7T/14T L1 cache.
  typedef enum logic [1:0] {
    MODE_NORMAL    = 2'd0,  // regular cache, full capacity, regular voltage
    MODE_LOWPOWER  = 2'd1,  // line-merged, half capacity, low voltage
    MODE_HIGHSPEED = 2'd2   // line-merged, half capacity, regular voltage
  } cache_mode_e;

  // Voltage-frequency level of a core power island.
  typedef enum logic {
    VF_REGULAR = 1'b0,  // 0.8 V, 800 MHz
    VF_LOW     = 1'b1   // 0.55 V, 400 MHz
  } vf_level_e;

  localparam int unsigned ADDR_W     = 32;
  localparam int unsigned WORD_W     = 32;
  localparam int unsigned LINE_BYTES = 64;
  localparam int unsigned LINE_W     = LINE_BYTES * 8;
  localparam int unsigned OFFSET_W   = $clog2(LINE_BYTES);
  localparam int unsigned WORDS_PER_LINE = LINE_BYTES / (WORD_W / 8);

  // L1 hit latency in cycles per mode.
  localparam int unsigned L1_LAT_NORMAL    = 4;
  localparam int unsigned L1_LAT_LOWPOWER  = 4;
  localparam int unsigned L1_LAT_HIGHSPEED = 3;

  // A mode in which the L1 runs as a line-merged (half capacity) cache.
  function automatic logic is_merged(cache_mode_e m);
    return (m == MODE_LOWPOWER) || (m == MODE_HIGHSPEED);
  endfunction

  // Supply level a mode needs.
  function automatic vf_level_e vf_of_mode(cache_mode_e m);
    return (m == MODE_LOWPOWER) ? VF_LOW : VF_REGULAR;
  endfunction

  function automatic int unsigned hit_latency(cache_mode_e m);
    case (m)
      MODE_HIGHSPEED: return L1_LAT_HIGHSPEED;
      MODE_LOWPOWER:  return L1_LAT_LOWPOWER;
      default:        return L1_LAT_NORMAL;
    endcase
  endfunction

endpackage
