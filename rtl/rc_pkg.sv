// rc_pkg: constants and sort-key layout shared by the parallel request
// counter of a three-stage ATM switch with intermediate channel grouping.
//
// The request counter of one input module merges that module's n1 cell
// headers with L2 control packets (one per output module) in a sorting
// network.  Every entry of the sorter carries a key laid out as
//   { idle, module[MW-1:0], ctrl }
// so that, in ascending order, the data cells for output module j come
// first, control packet j right after them, and idle entries (inactive
// input ports and unused sorter inputs) sort to the highest outputs.
// The default sizes, n1 = 96 ports per input module and L2 = 32 output
// modules, are those of the sample switch the design is sized for; the
// key layout itself is this design's own encoding.
package rc_pkg;

  // Sample switch: 96 input ports per input module, 32 output modules.
  parameter int unsigned N1_DEFAULT = 96;
  parameter int unsigned L2_DEFAULT = 32;

  // Sorter size: the smallest power of two holding n1 + L2 entries.
  function automatic int unsigned sorter_size(input int unsigned n1, input int unsigned l2);
    return 1 << $clog2(n1 + l2);
  endfunction

  // Number of compare-exchange columns of a bitonic sorter of 2**lp entries.
  function automatic int unsigned bitonic_columns(input int unsigned lp);
    return lp * (lp + 1) / 2;
  endfunction

  // Kinds of entry at a sorter output, as the address generator sees them.
  typedef enum logic [1:0] {
    ENTRY_DATA    = 2'd0,
    ENTRY_CONTROL = 2'd1,
    ENTRY_IDLE    = 2'd2
  } entry_kind_e;

endpackage
