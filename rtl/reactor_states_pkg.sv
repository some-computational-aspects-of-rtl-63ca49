// reactor_states_pkg: global states of the reactor controller, i.e. the
// reachable contents {ev, st} of its flip-flop registry, numbered
// breadth-first from the reset contents (code 0) with inputs tried in
// increasing binary order. Entry c of a table is bits [24*c +: 23].
// ORIG: original diagram; IMPR: improved diagram (synchronised t6).
// Machine-generated from the rules in reactor_pkg.
package reactor_states_pkg;
  localparam int unsigned N_ORIG = 143;
  localparam logic [24*N_ORIG-1:0] STATES_ORIG = {
    24'h0c2902, 24'h042942, 24'h082922, 24'h002962, 24'h0c2882, 24'h0428c2, 24'h0828a2, 24'h0028e2,
    24'h0c1902, 24'h041942, 24'h081922, 24'h001962, 24'h0c1a02, 24'h041a42, 24'h081a22, 24'h001a62,
    24'h0c1882, 24'h0418c2, 24'h0818a2, 24'h0018e2, 24'h0c2502, 24'h042542, 24'h082522, 24'h002562,
    24'h0c2602, 24'h042642, 24'h082622, 24'h002662, 24'h0c2482, 24'h0424c2, 24'h0824a2, 24'h0024e2,
    24'h0c1502, 24'h041542, 24'h081522, 24'h001562, 24'h0c1602, 24'h041642, 24'h081622, 24'h001662,
    24'h102962, 24'h026910, 24'h1028e2, 24'h026890, 24'h101962, 24'h025910, 24'h101a62, 24'h025a10,
    24'h1018e2, 24'h025890, 24'h102562, 24'h026510, 24'h102662, 24'h026610, 24'h1024e2, 24'h026490,
    24'h101562, 24'h025510, 24'h101662, 24'h025610, 24'h002901, 24'h426910, 24'h00a910, 24'h016910,
    24'h025490, 24'h002881, 24'h426890, 24'h00a890, 24'h016890, 24'h001901, 24'h425910, 24'h009910,
    24'h015910, 24'h001a01, 24'h425a10, 24'h009a10, 24'h015a10, 24'h001881, 24'h425890, 24'h009890,
    24'h015890, 24'h002501, 24'h426510, 24'h00a510, 24'h016510, 24'h002601, 24'h426610, 24'h00a610,
    24'h016610, 24'h002481, 24'h426490, 24'h00a490, 24'h016490, 24'h001501, 24'h425510, 24'h009510,
    24'h015510, 24'h001601, 24'h425610, 24'h009610, 24'h015610, 24'h002908, 24'h216910, 24'h425490,
    24'h009490, 24'h015490, 24'h002888, 24'h216890, 24'h001908, 24'h215910, 24'h001a08, 24'h215a10,
    24'h001888, 24'h215890, 24'h002508, 24'h216510, 24'h002608, 24'h216610, 24'h002488, 24'h216490,
    24'h001508, 24'h215510, 24'h001608, 24'h215610, 24'h001488, 24'h002904, 24'h215490, 24'h002884,
    24'h001904, 24'h001a04, 24'h001884, 24'h002504, 24'h002604, 24'h002484, 24'h001504, 24'h001604,
    24'h001484, 24'h0c1482, 24'h0414c2, 24'h0814a2, 24'h0014e2, 24'h1014e2, 24'h001481
  };
  localparam int unsigned N_IMPR = 41;
  localparam logic [24*N_IMPR-1:0] STATES_IMPR = {
    24'h0c2a02, 24'h042a42, 24'h082a22, 24'h002a62, 24'h102a62, 24'h026a10, 24'h002a01, 24'h426a10,
    24'h00aa10, 24'h016a10, 24'h002908, 24'h002a08, 24'h216a10, 24'h002888, 24'h001908, 24'h001a08,
    24'h001888, 24'h002508, 24'h002608, 24'h002488, 24'h001508, 24'h001608, 24'h001488, 24'h002904,
    24'h002a04, 24'h002884, 24'h001904, 24'h001a04, 24'h001884, 24'h002504, 24'h002604, 24'h002484,
    24'h001504, 24'h001604, 24'h001484, 24'h0c1482, 24'h0414c2, 24'h0814a2, 24'h0014e2, 24'h1014e2,
    24'h001481
  };
endpackage
