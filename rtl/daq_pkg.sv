// daq_pkg: widths, settings and event records shared by the acquisition design.
//
// Two independent parts use it. The spectroscopy part processes 14-bit samples at
// 100 MS/s per channel and emits energy/time events (dpp_event_t). The fast-timing
// part records 10-bit samples at 1 GS/s into multi-event buffers and a digital
// constant fraction discriminator turns each record into a list-mode entry
// (cfd_event_t): the digitiser's trigger time tag plus the interpolated arrival
// time of the pulse inside the record. The sample widths follow the digitisers
// described for the setup; time-stamp, energy and fine-time widths are this
// design's choices.
package daq_pkg;
  localparam int DPP_SAMPLE_W = 14;  // 14-bit spectroscopy ADC
  localparam int CFD_SAMPLE_W = 10;  // 10-bit fast-timing ADC
  localparam int TS_W         = 48;  // time-stamp counters (sample clock ticks)
  localparam int ENERGY_W     = 16;  // energy word of a spectroscopy event
  localparam int FINE_W       = 10;  // fine time: fraction of a sample, 1/1024
  localparam int COARSE_W     = 20;  // sample index inside a record
  localparam int CH_W         = 8;   // channel number in a list-mode entry
  localparam int TRAP_W       = 48;  // trapezoid filter output

  // Settings of one spectroscopy channel.
  typedef struct packed {
    logic [DPP_SAMPLE_W:0] step_thr;   // trigger: step over GAP samples
    logic [11:0]           holdoff;    // trigger re-arm hold-off, samples
    logic [11:0]           zc_window;  // samples searched for the zero crossing
    logic [10:0]           rise_k;     // trapezoid rise time k
    logic [10:0]           gap_l;      // trapezoid k + flat top
    logic [15:0]           pz_m;       // pole-zero constant M
    logic [11:0]           peak_delay; // trigger to flat-top sampling
    logic [3:0]            e_shift;    // energy right shift
    logic                  ext_trig_en;// also start on the board trigger
  } dpp_cfg_t;

  // One spectroscopy event.
  typedef struct packed {
    logic [TS_W-1:0]     ts;      // second-derivative zero crossing, sample ticks
    logic [ENERGY_W-1:0] energy;  // flat top minus baseline, shifted, saturated
    logic                pileup;  // another trigger before the flat top
    logic                no_zc;   // no zero crossing found: ts is the trigger time
  } dpp_event_t;

  // One list-mode entry of the fast-timing part.
  typedef struct packed {
    logic [CH_W-1:0]     channel;
    logic [TS_W-1:0]     ttag;    // trigger time tag of the record
    logic [COARSE_W-1:0] coarse;  // sample index just before the crossing
    logic [FINE_W-1:0]   fine;    // interpolated fraction of a sample
    logic                found;   // 0: no crossing in the record
  } cfd_event_t;
endpackage
