// flash_pkg: types and constants shared by the FLASH hardware scheduler.
//
// FLASH keeps one record per task in an unordered table and picks the
// runnable task with the smallest virtual runtime, the rule of the Linux
// Completely Fair Scheduler (CFS). This package holds the record layout, the
// update command carried by the process-control interface and the CFS
// priority weight table.
//
// Widths: a PID is 32 bits because the host reaches the device through 32-bit
// register accesses. Virtual and physical runtime are 48-bit nanosecond counts
// (about 78 hours before wrap). Priority is the nice level plus 20 (0..39).
// With the default 64 slots a record is 136 bits and the table 8704 bits
// (8.5 kib), the storage size quoted for the scheduler; how those bits are
// split between fields is this design's choice.
package flash_pkg;

  localparam int unsigned PID_W  = 32;
  localparam int unsigned PRIO_W = 6;
  localparam int unsigned VR_W   = 48;
  localparam int unsigned RT_W   = 48;
  localparam int unsigned NICE_LEVELS = 40;

  typedef logic [PID_W-1:0]  pid_t;
  typedef logic [PRIO_W-1:0] prio_t;
  typedef logic [VR_W-1:0]   vrt_t;
  typedef logic [RT_W-1:0]   rt_t;

  // Task state as seen by the scheduler: only runnable tasks are eligible.
  typedef enum logic [0:0] {
    ST_BLOCKED  = 1'b0,
    ST_RUNNABLE = 1'b1
  } task_state_e;

  // Kinds of process-control update ("Update Type").
  typedef enum logic [1:0] {
    UPD_CREATE    = 2'd0,  // new task: PID, priority, state
    UPD_EXIT      = 2'd1,  // remove the task with this PID
    UPD_SET_PRIO  = 2'd2,  // change the priority of PID
    UPD_SET_STATE = 2'd3   // change the state of PID
  } upd_type_e;

  // "Update Params": the (PID, priority, state) triple.
  typedef struct packed {
    pid_t        pid;
    logic [0:0]  rsvd;
    prio_t       prio;
    task_state_e state;
  } upd_params_t;   // 40 bits

  typedef struct packed {
    upd_type_e   kind;
    upd_params_t params;
  } upd_cmd_t;      // 42 bits

  // One record of the process data store (136 bits).
  typedef struct packed {
    logic        valid;
    task_state_e state;
    prio_t       prio;
    pid_t        pid;
    vrt_t        vruntime;
    rt_t         runtime;
  } task_entry_t;

  // CFS load weight of each nice level (nice -20 .. +19); nice 0 weighs 1024
  // and each step changes the CPU share by about 10 %.
  function automatic logic [16:0] nice_weight(input int unsigned idx);
    case (idx)
      0: return 17'd88761;  1: return 17'd71755;  2: return 17'd56483;
      3: return 17'd46273;  4: return 17'd36291;  5: return 17'd29154;
      6: return 17'd23254;  7: return 17'd18705;  8: return 17'd14949;
      9: return 17'd11916; 10: return 17'd9548;  11: return 17'd7620;
     12: return 17'd6100;  13: return 17'd4904;  14: return 17'd3906;
     15: return 17'd3121;  16: return 17'd2501;  17: return 17'd1991;
     18: return 17'd1586;  19: return 17'd1277;  20: return 17'd1024;
     21: return 17'd820;   22: return 17'd655;   23: return 17'd526;
     24: return 17'd423;   25: return 17'd335;   26: return 17'd272;
     27: return 17'd215;   28: return 17'd172;   29: return 17'd137;
     30: return 17'd110;   31: return 17'd87;    32: return 17'd70;
     33: return 17'd56;    34: return 17'd45;    35: return 17'd36;
     36: return 17'd29;    37: return 17'd23;    38: return 17'd18;
     default: return 17'd15;
    endcase
  endfunction

  // Inverse weight, 2^32 / weight, so that a weighted delta is a multiply
  // and a shift instead of a division.
  function automatic logic [31:0] nice_inv_weight(input int unsigned idx);
    logic [32:0] num;
    num = 33'h1_0000_0000;
    return 32'(num / 33'(nice_weight(idx)));
  endfunction

endpackage
