// cap_pkg: shared types and default sizes of the bottle-cap inspection pipeline.
//
// Every stage passes pixels on together with the three video timing signals of
// the camera read-out: vertical sync, horizontal sync and data enable. They are
// bundled in vsync_t so that each stage can delay them by its own latency and
// keep them aligned with its output data. The frame size is the 640 x 480
// camera image; the edge threshold 125 and the front/back threshold of 3000
// edge pixels are the values chosen in the design's experiments.
package cap_pkg;

  parameter int unsigned IMG_W       = 640;   // active pixels per line
  parameter int unsigned IMG_H       = 480;   // active lines per frame
  parameter int unsigned SOBEL_THR   = 125;   // gradient magnitude threshold
  parameter int unsigned SIDE_THR    = 3000;  // edge pixels for "front side"

  // Video timing bundle carried alongside each pixel.
  typedef struct packed {
    logic vs;   // vertical sync, high during the vertical sync pulse
    logic hs;   // horizontal sync, high during the horizontal sync pulse
    logic de;   // data enable, high for every active pixel
  } vsync_t;

endpackage
