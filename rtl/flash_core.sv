// flash_core: the FLASH hardware scheduler.
//
// FLASH takes the choice of the next task away from the operating system. It
// keeps a table of tasks (PID, priority, state, runtime, virtual runtime) and,
// like the Linux Completely Fair Scheduler, always picks the runnable task
// with the smallest priority-weighted runtime. Because the hardware holds the
// table in its own storage and can compare many records at once, the answer
// is computed while the CPU runs and is ready when asked for.
//
// Structure (front ends on the left, back ends on the right):
//
//   sched_req/ack, next_pid --- sched_control --- get_next_task ---+
//   tick_irq                       |                               |
//                            timer_tick_gen                  process_data
//                                                                  |
//   upd_req/ack, type, params - process_control - process_modify --+
//
// The scheduling-control side reads the store (and charges the outgoing task
// its runtime); the process-control side only writes it. min_vruntime from
// get_next_task tells process_modify where to place new and waking tasks.
//
// Both host interfaces are four-phase handshakes; see sched_control and
// process_control for their timing. A selection takes
// ceil(MAX_TASKS/LANES)+2 cycles after the request is seen; the interrupt for
// a timer tick is raised only once its selection is done.
module flash_core
  import flash_pkg::*;
#(
  parameter int unsigned MAX_TASKS    = 64,
  parameter int unsigned LANES        = 4,
  parameter int unsigned TICK_CYCLES  = 50000,
  parameter int unsigned NS_PER_CYCLE = 20,
  localparam int unsigned IDX_W = (MAX_TASKS > 1) ? $clog2(MAX_TASKS) : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  // scheduling control
  input  logic        sched_req,
  output logic        sched_ack,
  output pid_t        next_pid,
  output logic        next_valid,
  input  logic        tick_en,
  output logic        tick_irq,
  input  logic        tick_irq_clr,
  // process control
  input  logic        upd_req,
  input  upd_type_e   upd_type,
  input  upd_params_t upd_params,
  output logic        upd_ack,
  output logic        upd_err
);

  task_entry_t      entries [MAX_TASKS];

  logic             tick;
  logic             gnt_start, gnt_done, gnt_found, gnt_busy;
  rt_t              gnt_delta_ns;
  pid_t             gnt_pid;
  vrt_t             min_vruntime;
  logic             acc_en;
  logic [IDX_W-1:0] acc_idx;
  vrt_t             acc_vruntime;
  rt_t              acc_runtime;

  logic             pm_start, pm_done, pm_err, pm_busy;
  upd_cmd_t         pm_cmd;
  logic             wr_en;
  logic [IDX_W-1:0] wr_idx;
  task_entry_t      wr_entry;

  timer_tick_gen #(.TICK_CYCLES(TICK_CYCLES)) u_tick (
    .clk, .rst_n, .en(tick_en), .tick
  );

  sched_control #(.NS_PER_CYCLE(NS_PER_CYCLE)) u_sched (
    .clk, .rst_n,
    .sched_req, .sched_ack, .next_pid, .next_valid,
    .tick, .tick_irq, .tick_irq_clr,
    .gnt_start, .gnt_delta_ns, .gnt_done, .gnt_found, .gnt_pid
  );

  get_next_task #(.MAX_TASKS(MAX_TASKS), .LANES(LANES)) u_gnt (
    .clk, .rst_n,
    .start(gnt_start), .delta_ns(gnt_delta_ns), .busy(gnt_busy),
    .done(gnt_done), .found(gnt_found), .pid(gnt_pid),
    .min_vruntime,
    .entries, .acc_en, .acc_idx, .acc_vruntime, .acc_runtime
  );

  process_control u_pctl (
    .clk, .rst_n,
    .upd_req, .upd_type, .upd_params, .upd_ack, .upd_err,
    .pm_start, .pm_cmd, .pm_done, .pm_err
  );

  process_modify #(.MAX_TASKS(MAX_TASKS)) u_pmod (
    .clk, .rst_n,
    .start(pm_start), .cmd(pm_cmd), .busy(pm_busy), .done(pm_done), .err(pm_err),
    .min_vruntime, .entries, .wr_en, .wr_idx, .wr_entry
  );

  process_data #(.MAX_TASKS(MAX_TASKS)) u_data (
    .clk, .rst_n,
    .wr_en, .wr_idx, .wr_entry,
    .acc_en, .acc_idx, .acc_vruntime, .acc_runtime,
    .entries
  );

  // get_next_task is only started by sched_control, which waits for it.
  a_no_start_when_busy : assert property (@(posedge clk) disable iff (!rst_n)
    gnt_start |-> !gnt_busy);
  a_no_pm_start_when_busy : assert property (@(posedge clk) disable iff (!rst_n)
    pm_start |-> !pm_busy);

endmodule
